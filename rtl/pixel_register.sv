// pixel_register - input register RG of the forward converter.
//
// Captures a WIDTH-bit word together with a valid flag on every rising
// clock edge. When d_valid is high the word is loaded; when it is low the
// old word is kept and q_valid drops. A synchronous active-low reset clears
// both. One word per cycle, one cycle from d to q.
//
// The register is named by the converter's description; its valid flag and
// reset are this design's choice.
module pixel_register #(
  parameter int unsigned WIDTH = 24
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             d_valid,
  input  logic [WIDTH-1:0] d,
  output logic             q_valid,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      q_valid <= 1'b0;
      q       <= '0;
    end else begin
      q_valid <= d_valid;
      if (d_valid) q <= d;
    end
  end

endmodule
