// rns_adder_tree - multi-digit adder AD by modulus P.
//
// Sums the N encoder coefficients (each < P) modulo P with a binary tree of
// two-input modular adders (mod_adder, the "SM p" nodes). Each level pairs
// neighbouring values; when a level has an odd count the last value passes
// to the next level unchanged. For N = 24 the levels hold 24, 12, 6, 3, 2
// and 1 values, i.e. five adder levels and 23 adders, all combinational so
// that a whole pixel is converted in one clock cycle.
//
// The tree shape follows the block diagram of the adder; the pass-through
// of an odd value is this design's reading of the part of the diagram that
// is only sketched.
//
// Interface: coef (N residues of W bits, all < P), res (sum mod P).
module rns_adder_tree #(
  parameter int unsigned P = 7,
  parameter int unsigned N = 24,
  parameter int unsigned W = $clog2(P)
) (
  input  logic [N-1:0][W-1:0] coef,
  output logic [W-1:0]        res
);

  // Number of values at tree level l (level 0 = the inputs).
  function automatic int unsigned lvl_count(input int unsigned l);
    int unsigned c = N;
    for (int unsigned k = 0; k < l; k++) c = (c + 1) / 2;
    return c;
  endfunction

  function automatic int unsigned num_levels();
    int unsigned l = 0;
    while (lvl_count(l) > 1) l++;
    return l;
  endfunction

  localparam int unsigned L = num_levels();

  // node[l][k] is value k of level l; unused slots are never read.
  logic [N-1:0][W-1:0] node [L+1];

  assign node[0] = coef;

  for (genvar l = 0; l < L; l++) begin : g_lvl
    localparam int unsigned CIN  = lvl_count(l);
    localparam int unsigned COUT = lvl_count(l + 1);
    for (genvar k = 0; k < COUT; k++) begin : g_node
      if (2*k + 1 < CIN) begin : g_sm
        mod_adder #(.P(P), .W(W)) u_sm (
          .x(node[l][2*k]), .y(node[l][2*k+1]), .s(node[l+1][k])
        );
      end else begin : g_pass
        assign node[l+1][k] = node[l][2*k];
      end
    end
    for (genvar k = COUT; k < N; k++) begin : g_unused
      assign node[l+1][k] = '0;
    end
  end

  assign res = node[L][0];

endmodule
