// mod_adder - one "SM p" node of the multi-digit modular adder.
//
// Adds two residues x, y < P and returns (x + y) mod P. The binary sum is
// one bit wider than a residue; when it reaches P, P is subtracted once,
// which is enough because x + y <= 2P - 2. Purely combinational.
//
// The node itself is only named in the block diagram of the modular adder;
// the add-and-correct structure is this design's choice.
module mod_adder #(
  parameter int unsigned P = 7,
  parameter int unsigned W = $clog2(P)
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic [W-1:0] s
);

  localparam logic [W:0] PW = (W+1)'(P);

  logic [W:0] sum;

  always_comb begin
    sum = {1'b0, x} + {1'b0, y};
    s   = (sum >= PW) ? W'(sum - PW) : W'(sum);
  end

endmodule
