// rns_image_codec_top - RNS image coding chain: coder and decoder.
//
// The coding method splits each 24-bit pixel into five residues modulo 7,
// 23, 29, 59 and 61 so that the five "residue images" can travel over five
// different routes of a wireless sensor network, and recombines them at the
// receiver. This top holds both ends of that chain:
//   - rns_forward_converter, the dedicated coding co-processor, whose
//     residues leave on tx_res (one field per route, packed as in rns_pkg);
//   - rns_reverse_converter, which takes residues arriving on rx_res and
//     returns the pixel on rec_pix.
// The network between tx_res and rx_res is outside this design; a loopback
// (rx = tx) reproduces every pixel two cycles after its residues.
//
// Timing: one pixel per cycle in each direction; pix -> tx_res and
// rx_res -> rec_pix each take two clock edges. Synchronous active-low reset.
module rns_image_codec_top
  import rns_pkg::*;
#(
  parameter int unsigned PIX_BITS = 24
) (
  input  logic                clk,
  input  logic                rst_n,
  // pixels to code
  input  logic                pix_valid,
  input  logic [PIX_BITS-1:0] pix,
  // residues toward the routes
  output logic                tx_valid,
  output rns_word_t           tx_res,
  // residues back from the routes
  input  logic                rx_valid,
  input  rns_word_t           rx_res,
  // recovered pixels
  output logic                rec_valid,
  output logic [PIX_BITS-1:0] rec_pix
);

  rns_forward_converter #(.PIX_BITS(PIX_BITS)) u_coder (
    .clk, .rst_n,
    .in_valid(pix_valid), .in_pix(pix),
    .out_valid(tx_valid), .out_res(tx_res)
  );

  rns_reverse_converter #(.PIX_BITS(PIX_BITS)) u_decoder (
    .clk, .rst_n,
    .in_valid(rx_valid), .in_res(rx_res),
    .out_valid(rec_valid), .out_pix(rec_pix)
  );

endmodule
