// tb_mod_adder - exhaustive check of the modular adder node for three of
// the coder's moduli (7, 23, 61): every pair x, y < P must give
// (x + y) mod P, computed here with the % operator.
module tb_mod_adder;

  int checks = 0, failures = 0;

  logic [2:0] x7,  y7,  s7;
  logic [4:0] x23, y23, s23;
  logic [5:0] x61, y61, s61;

  mod_adder                    u7  (.x(x7),  .y(y7),  .s(s7));
  mod_adder #(.P(23), .W(5))   u23 (.x(x23), .y(y23), .s(s23));
  mod_adder #(.P(61), .W(6))   u61 (.x(x61), .y(y61), .s(s61));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 61; x++)
      for (int y = 0; y < 61; y++) begin
        x61 = 6'(x); y61 = 6'(y);
        x23 = 5'(x % 23); y23 = 5'(y % 23);
        x7  = 3'(x % 7);  y7  = 3'(y % 7);
        #1;
        checks += 3;
        if (s61 != 6'((x + y) % 61)) begin
          failures++; $display("mod 61: %0d + %0d -> %0d", x, y, s61);
        end
        if (s23 != 5'((x % 23 + y % 23) % 23)) begin
          failures++; $display("mod 23: %0d + %0d -> %0d", x % 23, y % 23, s23);
        end
        if (s7 != 3'((x % 7 + y % 7) % 7)) begin
          failures++; $display("mod 7: %0d + %0d -> %0d", x % 7, y % 7, s7);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
