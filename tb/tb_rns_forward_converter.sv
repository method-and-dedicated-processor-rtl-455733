// tb_rns_forward_converter - checks the coding co-processor.
//
// A random pixel stream (with random idle cycles, long back-to-back runs
// and the extreme pixels 0 and 2^24-1) is driven one word per clock. Every
// pixel presented before clock edge n must come out after edge n+1 with
// out_valid and with residues equal to pixel % p_i, computed here with the
// % operator; in an idle cycle out_valid must be low and out_res must hold.
// The testbench also checks the rate: a run of back-to-back pixels yields
// the same number of back-to-back results.
module tb_rns_forward_converter;

  int checks = 0, failures = 0;

  localparam int unsigned NM = 5;
  localparam int unsigned PM  [NM] = '{7, 23, 29, 59, 61};
  localparam int unsigned OFS [NM] = '{0, 3, 8, 13, 19};
  localparam int unsigned WID [NM] = '{3, 5, 5, 6, 6};
  localparam int NCYC = 4000;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        in_valid = 1'b0, out_valid;
  logic [23:0] in_pix = '0;
  logic [24:0] out_res;

  rns_forward_converter u_dut (
    .clk, .rst_n, .in_valid, .in_pix, .out_valid, .out_res
  );

  always #5 clk = ~clk;

  logic        hv [NCYC];
  logic [23:0] hp [NCYC];
  logic [24:0] last_res;
  int          run, longest_run;

  function automatic logic [24:0] residues(input logic [23:0] a);
    logic [24:0] r = '0;
    for (int unsigned i = 0; i < NM; i++)
      for (int unsigned b = 0; b < WID[i]; b++)
        r[OFS[i] + b] = 1'(((int'(a) % PM[i]) >> b) & 1);
    return r;
  endfunction

  initial begin : watchdog
    repeat (NCYC + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    last_res = '0; run = 0; longest_run = 0;
    for (int n = 0; n < NCYC; n++) begin
      // stimulus for cycle n
      if (n < 4)              hp[n] = (n % 2 == 0) ? 24'hFFFFFF : 24'h000000;
      else                    hp[n] = 24'($urandom);
      if (n >= 1000 && n < 1500) hv[n] = 1'b1;             // long burst
      else                       hv[n] = 1'($urandom_range(4) != 0);
      in_valid = hv[n]; in_pix = hp[n];
      @(posedge clk); #1;
      // result of cycle n-1 is now visible: two edges after it was presented
      if (n >= 1) begin
        checks++;
        if (out_valid !== hv[n-1]) begin
          failures++; $display("cycle %0d: out_valid %0b exp %0b", n, out_valid, hv[n-1]);
        end
        if (hv[n-1]) last_res = residues(hp[n-1]);
        checks++;
        if (out_res !== last_res) begin
          failures++; $display("cycle %0d: pix %h res %h exp %h", n, hp[n-1], out_res, last_res);
        end
        run = out_valid ? run + 1 : 0;
        if (run > longest_run) longest_run = run;
      end
    end
    checks++;
    if (longest_run < 500) begin
      failures++; $display("longest back-to-back output run %0d, expected >= 500", longest_run);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
