// plane_distance: squared distance of the query point from a node's splitting
// hyperplane, (coord - median)**2, where coord is the query coordinate in the
// node's dimension. The result is registered: operands presented in cycle t
// give sq_dist in cycle t+1, which is why the controller spends two cycles on
// the "second child" check. Full precision, 2W+2 bits.
module plane_distance
  import nns_pkg::*;
#(
  parameter int unsigned W = 16,
  localparam int unsigned SW = sq_width(W)
) (
  input  logic                clk,
  input  logic signed [W-1:0] coord,
  input  logic signed [W-1:0] median,
  output logic [SW-1:0]       sq_dist
);

  logic signed [W:0] diff;

  assign diff = $signed({coord[W-1], coord}) - $signed({median[W-1], median});

  always_ff @(posedge clk) begin
    sq_dist <= diff * diff;
  end

endmodule
