// tb_rns_image_codec_top - end-to-end test of the RNS image coding chain at
// its default parameters: one whole 640 x 480 frame of 24-bit pixels.
//
// The five residue routes are looped back (rx = tx), so every pixel goes
// through the coder and the reverse converter. Checked for every pixel:
//   - each route field of tx_res equals pixel % p_i (7, 23, 29, 59, 61);
//   - rec_pix equals the pixel.
// A short preamble with idle cycles precedes the frame, so the encoders'
// enable (E0) is seen both off and on; the frame itself is streamed with no
// gaps. Mechanisms counted, each of which must occur: converted pixels,
// cycles with the encoders disabled, back-to-back conversions, the pixel
// values 0 and 2^24-1.
//
// Rate and time: with back-to-back input the frame must leave the decoder
// in exactly 640*480 + 3 cycles from the first pixel (two edges through the
// coder, two through the decoder, one pixel per edge). The clock period is
// set to 16.7 ns, the conversion time of one pixel, so the frame time must
// come out at about 5 ms (5.13 ms).
module tb_rns_image_codec_top;

  int checks = 0, failures = 0;

  localparam int unsigned NM = 5;
  localparam int unsigned PM  [NM] = '{7, 23, 29, 59, 61};
  localparam int unsigned OFS [NM] = '{0, 3, 8, 13, 19};
  localparam int unsigned WID [NM] = '{3, 5, 5, 6, 6};
  localparam int COLS = 640, ROWS = 480;
  localparam int FRAME = COLS * ROWS;
  localparam int PRE = 64;                 // preamble pixels, with gaps

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        pix_valid = 1'b0, tx_valid, rec_valid;
  logic [23:0] pix = '0, rec_pix;
  logic [24:0] tx_res;

  rns_image_codec_top u_dut (
    .clk, .rst_n,
    .pix_valid, .pix,
    .tx_valid, .tx_res,
    .rx_valid(tx_valid), .rx_res(tx_res),     // routes looped back
    .rec_valid, .rec_pix
  );

  always #8.35ns clk = ~clk;                  // 16.7 ns period

  // expected pixels, in order
  logic [23:0] q_tx  [$];
  logic [23:0] q_rec [$];

  int   n_conv = 0, n_e0_off = 0, n_b2b = 0, n_zero = 0, n_ones = 0;
  int   n_rec = 0;
  logic prev_tx_valid = 1'b0;
  longint cyc = 0, first_cyc = -1, last_cyc = -1;
  realtime t_first, t_last;

  function automatic logic [23:0] pixel_at(input int x, input int y);
    logic [7:0] r, g, b;
    if (x == 0 && y == 0)   return 24'h000000;
    if (x == 1 && y == 0)   return 24'hFFFFFF;
    r = 8'((x * 255) / (COLS - 1));
    g = 8'((y * 255) / (ROWS - 1));
    b = 8'(x ^ y) ^ 8'($urandom_range(15));
    return {r, g, b};
  endfunction

  initial begin : watchdog
    repeat (FRAME + 4 * PRE + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitor: everything visible after each edge
  always @(posedge clk) begin
    #1;
    cyc++;
    if (rst_n) begin
      if (u_dut.u_coder.rg_valid == 1'b0) n_e0_off++;
      if (tx_valid) begin
        logic [23:0] a;
        a = q_tx.pop_front();
        n_conv++;
        if (prev_tx_valid) n_b2b++;
        if (a == 24'h000000) n_zero++;
        if (a == 24'hFFFFFF) n_ones++;
        for (int unsigned i = 0; i < NM; i++) begin
          int unsigned got;
          got = int'((tx_res >> OFS[i]) & ((1 << WID[i]) - 1));
          checks++;
          if (got != int'(a) % PM[i]) begin
            failures++;
            if (failures < 20) $display("pixel %h route %0d: residue %0d exp %0d", a, i, got, int'(a) % PM[i]);
          end
        end
      end
      prev_tx_valid = tx_valid;
      if (rec_valid) begin
        logic [23:0] a;
        a = q_rec.pop_front();
        n_rec++;
        checks++;
        if (rec_pix != a) begin
          failures++;
          if (failures < 20) $display("pixel %h recovered as %h", a, rec_pix);
        end
        if (n_rec == PRE + FRAME) begin
          last_cyc = cyc; t_last = $realtime;
        end
      end
    end
  end

  task automatic send(input logic v, input logic [23:0] a);
    pix_valid = v; pix = a;
    if (v) begin q_tx.push_back(a); q_rec.push_back(a); end
    @(posedge clk);
    #2;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #2;
    rst_n = 1'b1;
    // preamble: pixels with idle cycles between them
    for (int k = 0; k < PRE; k++) begin
      send(1'b1, 24'($urandom));
      if (k % 3 == 0) send(1'b0, 24'($urandom));
    end
    send(1'b0, '0);
    // one frame, back to back
    for (int y = 0; y < ROWS; y++)
      for (int x = 0; x < COLS; x++) begin
        if (x == 0 && y == 0) begin first_cyc = cyc + 1; t_first = $realtime; end
        send(1'b1, pixel_at(x, y));
      end
    send(1'b0, '0);
    repeat (6) @(posedge clk);
    #2;

    checks++;
    if (n_rec != PRE + FRAME || q_rec.size() != 0) begin
      failures++; $display("recovered %0d pixels, expected %0d", n_rec, PRE + FRAME);
    end
    checks++;
    if (last_cyc - first_cyc + 1 != FRAME + 3) begin
      failures++;
      $display("frame took %0d cycles, expected %0d", last_cyc - first_cyc + 1, FRAME + 3);
    end
    checks++;
    if (t_last - t_first < 4.5ms || t_last - t_first > 5.5ms) begin
      failures++; $display("frame time %0t outside 4.5..5.5 ms", t_last - t_first);
    end
    $display("frame: %0d cycles, %0.3f ms at 16.7 ns per pixel",
             last_cyc - first_cyc + 1, (t_last - t_first) / 1ms);
    $display("mechanisms: conversions %0d, E0-off cycles %0d, back-to-back %0d, zero pixels %0d, all-ones pixels %0d",
             n_conv, n_e0_off, n_b2b, n_zero, n_ones);
    checks += 5;
    if (n_conv == 0)   begin failures++; $display("no conversions"); end
    if (n_e0_off == 0) begin failures++; $display("encoders never disabled"); end
    if (n_b2b < FRAME - 1) begin failures++; $display("frame not converted back to back"); end
    if (n_zero == 0)   begin failures++; $display("pixel 0 never seen"); end
    if (n_ones == 0)   begin failures++; $display("pixel 2^24-1 never seen"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
