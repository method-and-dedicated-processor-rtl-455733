// rns_encoder - incomplete encoder EC for one modulus P.
//
// For every pixel bit a[j] it forms the coefficient a_j * (2^j mod P): the
// residue of that bit's weight when the bit is 1 and zero when it is 0, as
// the coefficient table of the coding method lists. Each output bit is
// therefore either constant 0 or the AND of the enabling input e0 and a[j];
// no real encoding logic is needed, which is why the encoder is called
// incomplete. The constants are computed at elaboration by
// rns_pkg::pow2_mod.
//
// Interface: e0 (enable, E0), a (N pixel bits), coef (N residues of W bits,
// coef[j] belongs to a[j]). Combinational. With e0 = 0 all outputs are 0.
module rns_encoder #(
  parameter int unsigned P = 7,
  parameter int unsigned N = 24,
  parameter int unsigned W = $clog2(P)
) (
  input  logic                e0,
  input  logic [N-1:0]        a,
  output logic [N-1:0][W-1:0] coef
);

  for (genvar j = 0; j < N; j++) begin : g_bit
    localparam logic [W-1:0] K = W'(rns_pkg::pow2_mod(j, P));
    assign coef[j] = K & {W{e0 & a[j]}};
  end

endmodule
