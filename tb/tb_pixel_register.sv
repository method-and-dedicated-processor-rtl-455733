// tb_pixel_register - checks the input register: reset clears it, a word
// with d_valid is seen on q one clock later with q_valid, and without
// d_valid the old word is held while q_valid is low.
module tb_pixel_register;

  int checks = 0, failures = 0;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        d_valid = 1'b0, q_valid;
  logic [23:0] d = '0, q;

  pixel_register u_dut (.clk, .rst_n, .d_valid, .d, .q_valid, .q);

  always #5 clk = ~clk;

  task automatic expect_q(input logic v, input logic [23:0] w);
    checks++;
    if (q_valid !== v || q !== w) begin
      failures++;
      $display("t=%0t q_valid %0b q %h, expected %0b %h", $time, q_valid, q, v, w);
    end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [23:0] last;
    d = 24'hABCDEF; d_valid = 1'b1;
    @(posedge clk); @(posedge clk); #1;
    expect_q(1'b0, 24'h0);                 // held in reset
    rst_n = 1'b1;
    last = '0;
    for (int n = 0; n < 500; n++) begin
      logic        v;
      logic [23:0] w;
      v = 1'($urandom_range(3) != 0);
      w = 24'($urandom);
      d_valid = v; d = w;
      @(posedge clk); #1;
      if (v) last = w;
      expect_q(v, last);
    end
    rst_n = 1'b0; d_valid = 1'b1;
    @(posedge clk); #1;
    expect_q(1'b0, 24'h0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
