// tb_rns_reverse_converter - checks the CRT reverse converter.
//
// Residue sets are made here in three ways: from random 24-bit pixels
// (result must be the pixel), from arbitrary in-range residues (result
// must be the CRT value mod 16803731, low 24 bits), and with one residue
// out of range (that residue must count as zero). The reference CRT is
// computed in the testbench by searching each weight d_i directly. Sets
// are driven one per clock with random gaps; the result of a set
// presented before edge n is checked after edge n+1.
module tb_rns_reverse_converter;

  int checks = 0, failures = 0;

  localparam int unsigned NM = 5;
  localparam int unsigned PM  [NM] = '{7, 23, 29, 59, 61};
  localparam int unsigned OFS [NM] = '{0, 3, 8, 13, 19};
  localparam int unsigned WID [NM] = '{3, 5, 5, 6, 6};
  localparam longint PHI_REF = 64'd7 * 23 * 29 * 59 * 61;
  localparam int NCYC = 3000;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        in_valid = 1'b0, out_valid;
  logic [24:0] in_res = '0;
  logic [23:0] out_pix;

  rns_reverse_converter u_dut (
    .clk, .rst_n, .in_valid, .in_res, .out_valid, .out_pix
  );

  always #5 clk = ~clk;

  longint      basis [NM];
  logic        hv [NCYC];
  logic [24:0] hr [NCYC];
  logic [23:0] he [NCYC];
  logic [23:0] last_pix;

  function automatic logic [23:0] crt_ref(input logic [24:0] r);
    longint s = 0;
    for (int unsigned i = 0; i < NM; i++) begin
      longint b = longint'((r >> OFS[i]) & ((1 << WID[i]) - 1));
      if (b < PM[i]) s += b * basis[i];
    end
    return 24'(s % PHI_REF);
  endfunction

  function automatic logic [24:0] pack(input int unsigned v [NM]);
    logic [24:0] r = '0;
    for (int unsigned i = 0; i < NM; i++)
      r |= 25'(v[i]) << OFS[i];
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
    // basis: the multiple of PHI/p_i that is 1 modulo p_i
    for (int unsigned i = 0; i < NM; i++) begin
      longint m;
      m = PHI_REF / PM[i];
      basis[i] = 0;
      for (longint d = 1; d < PM[i]; d++)
        if ((m * d) % PM[i] == 1) basis[i] = m * d;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    last_pix = '0;
    for (int n = 0; n < NCYC; n++) begin
      int unsigned v [NM];
      int          kind;
      logic [23:0] a;
      kind = (n < 2) ? 0 : $urandom_range(9);
      a = (n == 0) ? 24'hFFFFFF : (n == 1) ? 24'h0 : 24'($urandom);
      for (int unsigned i = 0; i < NM; i++) v[i] = int'(a) % PM[i];
      if (kind == 8)      for (int unsigned i = 0; i < NM; i++) v[i] = $urandom_range(PM[i] - 1);
      else if (kind == 9) begin
        int unsigned k;
        k = $urandom_range(NM - 1);
        v[k] = $urandom_range((1 << WID[k]) - 1, PM[k]);
      end
      hr[n] = pack(v);
      he[n] = (kind < 8) ? a : crt_ref(hr[n]);
      hv[n] = 1'($urandom_range(5) != 0);
      in_valid = hv[n]; in_res = hr[n];
      @(posedge clk); #1;
      if (n >= 1) begin
        checks++;
        if (out_valid !== hv[n-1]) begin
          failures++; $display("cycle %0d: out_valid %0b exp %0b", n, out_valid, hv[n-1]);
        end
        if (hv[n-1]) last_pix = he[n-1];
        checks++;
        if (out_pix !== last_pix) begin
          failures++; $display("cycle %0d: res %h -> %h exp %h", n, hr[n-1], out_pix, last_pix);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
