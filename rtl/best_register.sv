// best_register: the registers that hold the closest point found so far and
// its squared distance from the query point.
//
// clear=1 (start of a query) sets the distance to its largest value, so the
// first candidate always wins. Otherwise a valid candidate replaces the
// stored point and distance when its distance is strictly smaller; on a tie
// the earlier point stays. The outputs are the registers themselves and
// change one clock after the winning candidate is presented.
module best_register
  import nns_pkg::*;
#(
  parameter int unsigned W  = 16,
  parameter int unsigned K  = 3,
  localparam int unsigned DSW = dist_width(W, K)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,
  input  logic                cand_valid,
  input  logic signed [W-1:0] cand_point [K],
  input  logic [DSW-1:0]      cand_dist,
  output logic signed [W-1:0] best_point [K],
  output logic [DSW-1:0]      best_dist
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      best_dist <= '1;
      for (int i = 0; i < int'(K); i++) best_point[i] <= '0;
    end else if (clear) begin
      best_dist <= '1;
      for (int i = 0; i < int'(K); i++) best_point[i] <= '0;
    end else if (cand_valid && cand_dist < best_dist) begin
      best_dist  <= cand_dist;
      best_point <= cand_point;
    end
  end

endmodule
