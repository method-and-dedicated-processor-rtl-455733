// rns_forward_converter - the dedicated co-processor that codes pixels into
// the residue number system.
//
// A PIX_BITS-bit pixel A enters the input register RG. From there its bits
// go to five incomplete encoders EC1..EC5, one per modulus p_i of rns_pkg
// (7, 23, 29, 59, 61). Encoder i replaces each 1 bit a_j by the constant
// 2^j mod p_i; the multi-digit adder AD of modulus p_i adds these
// constants modulo p_i, which by direct addition gives b_i = A mod p_i.
// The five residues are captured in an output register.
//
// Timing: one pixel can be presented every clock cycle (in_valid, in_pix).
// It is taken into RG on the next rising edge and its residues appear on
// out_res, with out_valid high, after the following edge: a latency of two
// edges and a throughput of one pixel per cycle. Encoders and adders form a
// single combinational stage between the two registers.
//
// The register / encoder / adder structure, the moduli and the one-pixel-
// per-cycle rate follow the coding method. Driving the encoders' enabling
// input E0 from RG's valid flag, the output register and the synchronous
// active-low reset are this design's choices.
//
// out_res packs b1 (3 bits) in the low bits, then b2 (5), b3 (5), b4 (6),
// b5 (6), see rns_pkg::res_offset.
module rns_forward_converter
  import rns_pkg::*;
#(
  parameter int unsigned PIX_BITS = 24
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [PIX_BITS-1:0] in_pix,
  output logic                out_valid,
  output rns_word_t           out_res
);

  logic                rg_valid;
  logic [PIX_BITS-1:0] rg_pix;
  rns_word_t           res_next;

  pixel_register #(.WIDTH(PIX_BITS)) u_rg (
    .clk, .rst_n,
    .d_valid(in_valid), .d(in_pix),
    .q_valid(rg_valid), .q(rg_pix)
  );

  for (genvar i = 0; i < NMOD; i++) begin : g_mod
    localparam int unsigned P   = MODULI[i];
    localparam int unsigned W   = res_width(P);
    localparam int unsigned OFF = res_offset(i);

    logic [PIX_BITS-1:0][W-1:0] coef;

    rns_encoder #(.P(P), .N(PIX_BITS), .W(W)) u_ec (
      .e0(rg_valid), .a(rg_pix), .coef(coef)
    );

    rns_adder_tree #(.P(P), .N(PIX_BITS), .W(W)) u_ad (
      .coef(coef), .res(res_next[OFF +: W])
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_res   <= '0;
    end else begin
      out_valid <= rg_valid;
      if (rg_valid) out_res <= res_next;
    end
  end

endmodule
