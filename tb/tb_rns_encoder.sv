// tb_rns_encoder - checks the five incomplete encoders.
//
// Reference: the coefficient table of the coding method, 2^j mod p for
// j = 23..19 and 7..0, typed in below; the remaining positions are
// derived here by doubling modulo p. Tests: every single-bit input (the
// table's own case), e0 = 0 (all outputs zero), and random pixels, where
// coef[j] must equal the table entry for each 1 bit and 0 for each 0 bit.
module tb_rns_encoder;

  int checks = 0, failures = 0;

  localparam int unsigned NM = 5;
  localparam int unsigned PM [NM] = '{7, 23, 29, 59, 61};

  // Printed columns, index [modulus][k], k = 0..4 -> j = 23..19,
  // k = 5..12 -> j = 7..0.
  localparam int unsigned TAB_HI [NM][5] = '{
    '{4, 2, 1, 4, 2}, '{2, 1, 12, 6, 3}, '{10, 5, 17, 23, 26},
    '{47, 53, 56, 28, 14}, '{10, 5, 33, 47, 54}};
  localparam int unsigned TAB_LO [NM][8] = '{
    '{2, 1, 4, 2, 1, 4, 2, 1}, '{13, 18, 9, 16, 8, 4, 2, 1},
    '{12, 6, 3, 16, 8, 4, 2, 1}, '{10, 5, 32, 16, 8, 4, 2, 1},
    '{6, 3, 32, 16, 8, 4, 2, 1}};

  int unsigned ref_tab [NM][24];

  logic        e0;
  logic [23:0] a;
  logic [23:0][2:0] c7;
  logic [23:0][4:0] c23, c29;
  logic [23:0][5:0] c59, c61;

  rns_encoder                    u7  (.e0, .a, .coef(c7));
  rns_encoder #(.P(23), .W(5))   u23 (.e0, .a, .coef(c23));
  rns_encoder #(.P(29), .W(5))   u29 (.e0, .a, .coef(c29));
  rns_encoder #(.P(59), .W(6))   u59 (.e0, .a, .coef(c59));
  rns_encoder #(.P(61), .W(6))   u61 (.e0, .a, .coef(c61));

  function automatic int unsigned got(int unsigned m, int unsigned j);
    case (m)
      0: return c7[j];
      1: return c23[j];
      2: return c29[j];
      3: return c59[j];
      default: return c61[j];
    endcase
  endfunction

  task automatic check_all(input logic en, input logic [23:0] pix);
    e0 = en; a = pix; #1;
    for (int unsigned m = 0; m < NM; m++)
      for (int unsigned j = 0; j < 24; j++) begin
        int unsigned exp = (en && pix[j]) ? ref_tab[m][j] : 0;
        checks++;
        if (got(m, j) != exp) begin
          failures++;
          $display("mod %0d bit %0d pix %h e0 %0b: got %0d exp %0d",
                   PM[m], j, pix, en, got(m, j), exp);
        end
      end
  endtask

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // build the reference: printed cells, others by doubling; the printed
    // cells must agree with doubling as well
    for (int unsigned m = 0; m < NM; m++) begin
      int unsigned r;
      r = 1;
      for (int unsigned j = 0; j < 24; j++) begin
        ref_tab[m][j] = r;
        r = (2 * r) % PM[m];
      end
      for (int unsigned k = 0; k < 5; k++) begin
        checks++;
        if (ref_tab[m][23-k] != TAB_HI[m][k]) begin
          failures++; $display("table mismatch mod %0d j %0d", PM[m], 23-k);
        end
        ref_tab[m][23-k] = TAB_HI[m][k];
      end
      for (int unsigned k = 0; k < 8; k++) begin
        checks++;
        if (ref_tab[m][7-k] != TAB_LO[m][k]) begin
          failures++; $display("table mismatch mod %0d j %0d", PM[m], 7-k);
        end
        ref_tab[m][7-k] = TAB_LO[m][k];
      end
    end

    for (int j = 0; j < 24; j++) check_all(1'b1, 24'(1) << j);
    check_all(1'b0, 24'hFFFFFF);
    check_all(1'b1, 24'hFFFFFF);
    check_all(1'b1, 24'h000000);
    for (int n = 0; n < 200; n++) check_all(1'b1, 24'($urandom));
    for (int n = 0; n < 20; n++)  check_all(1'b0, 24'($urandom));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
