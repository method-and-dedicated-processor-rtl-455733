// rns_reverse_converter - recovers a pixel from its five residues.
//
// Chinese remainder theorem: A = (sum_i b_i * B_i) mod PHI, where the
// orthogonal basis B_i = (PHI/p_i) * d_i is 1 modulo p_i and 0 modulo every
// other modulus. Instead of multipliers, each modulus has a small table,
// computed at elaboration, holding (b * B_i) mod PHI for every b < p_i
// (7 + 23 + 29 + 59 + 61 = 179 words). The five looked-up terms are each
// below PHI, so their sum is below 5*PHI; the final reduction subtracts the
// largest multiple k*PHI (k = 0..4) not above the sum. A residue outside
// its range (b_i >= p_i) contributes zero. The result is below PHI; a
// residue set that does not come from a PIX_BITS-bit pixel (result >= 2^24)
// is returned truncated to PIX_BITS bits.
//
// Timing: residues presented with in_valid are registered on the next
// rising edge, the pixel appears on out_pix with out_valid after the
// following edge; one residue set per cycle.
//
// The recovery formula and the basis are those of the coding method; the
// table-and-compare structure, the registers and the reset are this
// design's own, as the method gives no hardware for this step.
module rns_reverse_converter
  import rns_pkg::*;
#(
  parameter int unsigned PIX_BITS = 24
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  rns_word_t           in_res,
  output logic                out_valid,
  output logic [PIX_BITS-1:0] out_pix
);

  localparam int unsigned SW = $clog2(5 * PHI);   // width of the sum (< 5*PHI)

  typedef logic [TERM_W-1:0] term_t;
  typedef logic [SW-1:0] sum_t;

  logic      rg_valid;
  rns_word_t rg_res;
  term_t     term [NMOD];
  sum_t      total;
  logic [PIX_BITS-1:0] pix_next;   // (total mod PHI), low PIX_BITS bits

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rg_valid <= 1'b0;
      rg_res   <= '0;
    end else begin
      rg_valid <= in_valid;
      if (in_valid) rg_res <= in_res;
    end
  end

  for (genvar i = 0; i < NMOD; i++) begin : g_term
    localparam int unsigned P   = MODULI[i];
    localparam int unsigned W   = res_width(P);
    localparam int unsigned OFF = res_offset(i);

    // TAB[b] = (b * B_i) mod PHI
    localparam crt_table_t TAB = crt_table(P);

    logic [W-1:0] b;
    assign b = rg_res[OFF +: W];

    always_comb begin
      term[i] = '0;
      for (int unsigned v = 0; v < P; v++)
        if (b == W'(v)) term[i] = TAB[v];
    end
  end

  always_comb begin
    total = '0;
    for (int unsigned i = 0; i < NMOD; i++) total += SW'(term[i]);
    pix_next = PIX_BITS'(total);
    for (int unsigned k = 4; k >= 1; k--) begin
      if (total >= SW'(k * PHI)) begin
        pix_next = PIX_BITS'(total - SW'(k * PHI));
        break;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_pix   <= '0;
    end else begin
      out_valid <= rg_valid;
      if (rg_valid) out_pix <= pix_next;
    end
  end

endmodule
