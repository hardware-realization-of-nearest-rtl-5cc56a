// nns_top: nearest neighbour search engine over a k-d tree pre-stored in two
// memories. A query point of K signed W-bit coordinates enters through a
// ready/valid handshake; the engine walks the tree depth first with an
// explicit node stack, scans the points of every leaf it reaches, skips
// subtrees that cannot hold a closer point, and returns the stored point
// closest to the query (squared Euclidean distance) through a second
// ready/valid handshake.
//
// Parts: tree_rom (node words, combinational read), points_rom (points,
// one-clock read), node_stack, point_distance (registered), best_register,
// plane_distance (registered) and nns_ctrl. The tree ROM has 2**DEPTH words,
// the points ROM 2**AW. Both are pre-stored, either from the $readmemh
// images named by TREE_INIT and POINTS_INIT or through the *_we ports before
// queries are run; a points write uses the points ROM's single port, so
// loading and searching must not overlap.
//
// Latency is data dependent: one clock per tree node step, one per point of a
// visited leaf, two per second-child check, plus three clocks from the last
// point of the search to out_valid. The defaults are the published reference
// instance: 16-bit coordinates, 3 dimensions, 31-node tree, 100 points.
module nns_top
  import nns_pkg::*;
#(
  parameter int unsigned W     = 16,
  parameter int unsigned K     = 3,
  parameter int unsigned AW    = 7,
  parameter int unsigned DEPTH = 5,
  parameter string       TREE_INIT   = "",
  parameter string       POINTS_INIT = "",
  localparam int unsigned DW   = dim_width(K),
  localparam int unsigned SW   = sq_width(W),
  localparam int unsigned DSW  = dist_width(W, K),
  localparam int unsigned NW   = 1 + W + 2 * AW
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  output logic                in_ready,
  input  logic signed [W-1:0] in_point [K],
  output logic                out_valid,
  input  logic                out_ready,
  output logic signed [W-1:0] out_point [K],
  // tree ROM loading: word = { leaf, median, start, count }
  input  logic                tree_we,
  input  logic [DEPTH-1:0]    tree_waddr,
  input  logic [NW-1:0]       tree_wdata,
  // points ROM loading: word = { coord K-1, ..., coord 0 }
  input  logic                pts_we,
  input  logic [AW-1:0]       pts_waddr,
  input  logic [K*W-1:0]      pts_wdata
);

  stack_op_e           stack_op;
  logic [DEPTH-1:0]    stack_addr, top_addr;
  logic [DW-1:0]       stack_depth, top_depth;
  logic                top_child, stack_empty;

  logic [NW-1:0]       node_word;
  logic                node_leaf;
  logic signed [W-1:0] node_median;
  logic [AW-1:0]       node_start, node_count;

  logic                pts_rd, pts_rd_q;
  logic [AW-1:0]       pts_addr;
  logic [K*W-1:0]      pts_rdata;
  logic signed [W-1:0] query [K];
  logic signed [W-1:0] rom_point [K];

  logic                cand_valid;
  logic signed [W-1:0] cand_point [K];
  logic [DSW-1:0]      cand_dist, best_dist;
  logic                best_clear;

  logic signed [W-1:0] plane_coord, plane_median;
  logic [SW-1:0]       plane_dist;

  nns_ctrl #(.W(W), .K(K), .AW(AW), .DEPTH(DEPTH)) u_ctrl (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_point,
    .out_valid, .out_ready,
    .stack_op, .stack_addr, .stack_depth,
    .top_addr, .top_child, .top_depth, .stack_empty,
    .node_leaf, .node_median, .node_start, .node_count,
    .pts_rd, .pts_addr, .query,
    .plane_coord, .plane_median, .plane_dist,
    .best_clear, .best_dist
  );

  node_stack #(.DEPTH(DEPTH), .K(K)) u_stack (
    .clk, .rst_n,
    .op(stack_op), .new_addr(stack_addr), .new_depth(stack_depth),
    .top_addr, .top_child, .top_depth, .empty(stack_empty)
  );

  tree_rom #(.W(W), .AW(AW), .DEPTH(DEPTH), .INIT_FILE(TREE_INIT)) u_tree_rom (
    .clk, .we(tree_we), .waddr(tree_waddr), .wdata(tree_wdata),
    .raddr(top_addr), .rdata(node_word)
  );

  assign {node_leaf, node_median, node_start, node_count} = node_word;

  points_rom #(.W(W), .K(K), .AW(AW), .INIT_FILE(POINTS_INIT)) u_points_rom (
    .clk, .we(pts_we), .addr(pts_we ? pts_waddr : pts_addr),
    .wdata(pts_wdata), .rdata(pts_rdata)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pts_rd_q <= 1'b0;
    else        pts_rd_q <= pts_rd && !pts_we;
  end

  always_comb begin
    for (int i = 0; i < int'(K); i++) rom_point[i] = pts_rdata[i*W +: W];
  end

  point_distance #(.W(W), .K(K)) u_point_dist (
    .clk, .rst_n,
    .in_valid(pts_rd_q), .query, .point(rom_point),
    .out_valid(cand_valid), .out_point(cand_point), .out_dist(cand_dist)
  );

  best_register #(.W(W), .K(K)) u_best (
    .clk, .rst_n, .clear(best_clear),
    .cand_valid, .cand_point, .cand_dist,
    .best_point(out_point), .best_dist
  );

  plane_distance #(.W(W)) u_plane_dist (
    .clk, .coord(plane_coord), .median(plane_median), .sq_dist(plane_dist)
  );

endmodule
