// tb_rns_adder_tree - checks the 24-input modular adder tree for each of
// the five moduli against a plain sum taken modulo p. Inputs are random
// residues, plus the all-(p-1) case that exercises every correction.
module tb_rns_adder_tree;

  int checks = 0, failures = 0;

  logic [23:0][2:0] i7;  logic [2:0] o7;
  logic [23:0][4:0] i23; logic [4:0] o23;
  logic [23:0][4:0] i29; logic [4:0] o29;
  logic [23:0][5:0] i59; logic [5:0] o59;
  logic [23:0][5:0] i61; logic [5:0] o61;

  rns_adder_tree                  u7  (.coef(i7),  .res(o7));
  rns_adder_tree #(.P(23), .W(5)) u23 (.coef(i23), .res(o23));
  rns_adder_tree #(.P(29), .W(5)) u29 (.coef(i29), .res(o29));
  rns_adder_tree #(.P(59), .W(6)) u59 (.coef(i59), .res(o59));
  rns_adder_tree #(.P(61), .W(6)) u61 (.coef(i61), .res(o61));

  int unsigned s7, s23, s29, s59, s61;

  task automatic drive(input bit maxed);
    s7 = 0; s23 = 0; s29 = 0; s59 = 0; s61 = 0;
    for (int j = 0; j < 24; j++) begin
      int unsigned v7  = maxed ? 6  : $urandom_range(6);
      int unsigned v23 = maxed ? 22 : $urandom_range(22);
      int unsigned v29 = maxed ? 28 : $urandom_range(28);
      int unsigned v59 = maxed ? 58 : $urandom_range(58);
      int unsigned v61 = maxed ? 60 : $urandom_range(60);
      i7[j] = 3'(v7); i23[j] = 5'(v23); i29[j] = 5'(v29);
      i59[j] = 6'(v59); i61[j] = 6'(v61);
      s7 += v7; s23 += v23; s29 += v29; s59 += v59; s61 += v61;
    end
    #1;
    checks += 5;
    if (o7  != 3'(s7 % 7))   begin failures++; $display("mod 7 got %0d exp %0d",  o7,  s7 % 7);  end
    if (o23 != 5'(s23 % 23)) begin failures++; $display("mod 23 got %0d exp %0d", o23, s23 % 23); end
    if (o29 != 5'(s29 % 29)) begin failures++; $display("mod 29 got %0d exp %0d", o29, s29 % 29); end
    if (o59 != 6'(s59 % 59)) begin failures++; $display("mod 59 got %0d exp %0d", o59, s59 % 59); end
    if (o61 != 6'(s61 % 61)) begin failures++; $display("mod 61 got %0d exp %0d", o61, s61 % 61); end
  endtask

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    drive(1'b1);
    for (int n = 0; n < 2000; n++) drive(1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
