// point_distance: squared Euclidean distance between the query point and a
// point read from the points ROM, sum over k of (q[k]-p[k])**2.
//
// The subtractions, squares and sum are combinational; the result is
// registered together with the point and a valid bit, so a point presented
// in cycle t is available as a candidate for the closest-point register in
// cycle t+1. This register, with the one-cycle read of the points ROM, makes
// up the two cycles the delay counter of the published design waits for. The result has
// full precision (2W+2+clog2(K) bits), so it never overflows.
module point_distance
  import nns_pkg::*;
#(
  parameter int unsigned W  = 16,
  parameter int unsigned K  = 3,
  localparam int unsigned DSW = dist_width(W, K)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic signed [W-1:0]   query [K],
  input  logic signed [W-1:0]   point [K],
  output logic                  out_valid,
  output logic signed [W-1:0]   out_point [K],
  output logic [DSW-1:0]        out_dist
);

  logic [DSW-1:0] sum_sq;

  always_comb begin
    sum_sq = '0;
    for (int i = 0; i < int'(K); i++) begin
      logic signed [W:0]     diff;
      logic        [2*W+1:0] sq;
      diff = $signed({query[i][W-1], query[i]}) - $signed({point[i][W-1], point[i]});
      sq   = diff * diff;
      sum_sq = sum_sq + DSW'(sq);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      out_point <= point;
      out_dist  <= sum_sq;
    end
  end

endmodule
