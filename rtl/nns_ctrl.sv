// nns_ctrl: control of the k-d tree nearest neighbour search. It holds the
// query point and decides, every clock, what to do from the node on top of
// the node stack and the tree ROM word of that node:
//
//   leaf            read the leaf's points one per clock (start + counter);
//                   after the last one reset the counter, pop the node and
//                   load the delay counter with 2. An empty leaf is popped.
//   inner, child=0  compare the query coordinate of the node's dimension
//                   with the median: smaller goes left (2n+1), otherwise
//                   right (2n+2). Push that first child and mark the node
//                   "second child next".
//   inner, child=1  two clocks: the first registers the squared distance to
//                   the splitting plane (plane_distance, one-bit wait
//                   register set); the second pops the node if the best
//                   distance is not greater than it, else replaces the node
//                   with its other child.
//   stack empty     final phase: once the delay counter is 0 the result is
//                   valid; when it is taken the stack is re-initialised to
//                   the root and a new query may enter.
//
// The delay counter covers the points ROM read and the distance register, so
// the closest-point register is final when the result is offered. It counts
// down every clock whatever the mode. The plane check uses the best distance
// as it stands, even while the last points of a leaf are still in flight:
// that can only cause extra visits, never a wrong result.
//
// Handshakes: a query is accepted (in_valid && in_ready) only while idle; the
// result is held on out_valid until out_ready. Modes, the delay of 2, the
// two-clock plane check and the stack use follow the published description; the idle
// state, the empty-leaf rule and the handshake details are this design's.
module nns_ctrl
  import nns_pkg::*;
#(
  parameter int unsigned W     = 16,
  parameter int unsigned K     = 3,
  parameter int unsigned AW    = 7,
  parameter int unsigned DEPTH = 5,
  localparam int unsigned DW   = dim_width(K),
  localparam int unsigned SW   = sq_width(W),
  localparam int unsigned DSW  = dist_width(W, K)
) (
  input  logic                clk,
  input  logic                rst_n,
  // query in
  input  logic                in_valid,
  output logic                in_ready,
  input  logic signed [W-1:0] in_point [K],
  // result out (the point itself comes from the best register)
  output logic                out_valid,
  input  logic                out_ready,
  // node stack
  output stack_op_e           stack_op,
  output logic [DEPTH-1:0]    stack_addr,
  output logic [DW-1:0]       stack_depth,
  input  logic [DEPTH-1:0]    top_addr,
  input  logic                top_child,
  input  logic [DW-1:0]       top_depth,
  input  logic                stack_empty,
  // tree ROM word of the top node
  input  logic                node_leaf,
  input  logic signed [W-1:0] node_median,
  input  logic [AW-1:0]       node_start,
  input  logic [AW-1:0]       node_count,
  // points ROM read
  output logic                pts_rd,
  output logic [AW-1:0]       pts_addr,
  output logic signed [W-1:0] query [K],
  // plane distance unit
  output logic signed [W-1:0] plane_coord,
  output logic signed [W-1:0] plane_median,
  input  logic [SW-1:0]       plane_dist,
  // best register
  output logic                best_clear,
  input  logic [DSW-1:0]      best_dist
);

  logic            busy_q;
  logic [AW-1:0]   pcnt_q;
  logic [1:0]      delay_q;
  logic            plane_wait_q;

  logic            in_fire;
  logic            go_left;
  logic [DEPTH-1:0] left_child, right_child;
  logic [DW-1:0]   next_depth;
  logic            last_point;
  logic            prune;

  assign in_ready   = !busy_q;
  assign in_fire    = in_valid && in_ready;
  assign best_clear = in_fire;

  assign plane_coord  = query[top_depth];
  assign plane_median = node_median;

  assign go_left     = query[top_depth] < node_median;
  assign left_child  = DEPTH'({top_addr, 1'b1});
  assign right_child = DEPTH'({top_addr, 1'b0} + 2);
  assign next_depth  = (top_depth == DW'(K - 1)) ? '0 : top_depth + DW'(1);
  assign last_point  = (pcnt_q == node_count - AW'(1));
  assign prune       = best_dist <= DSW'(plane_dist);
  assign pts_addr    = node_start + pcnt_q;

  always_comb begin
    stack_op    = STK_NONE;
    stack_addr  = go_left ? left_child : right_child;
    stack_depth = next_depth;
    pts_rd      = 1'b0;
    out_valid   = 1'b0;
    if (busy_q) begin
      if (stack_empty) begin
        out_valid = (delay_q == '0);
        if (out_valid && out_ready) stack_op = STK_INIT;
      end else if (node_leaf) begin
        if (node_count == '0) begin
          stack_op = STK_POP;
        end else begin
          pts_rd = 1'b1;
          if (last_point) stack_op = STK_POP;
        end
      end else if (!top_child) begin
        stack_op = STK_DESCEND;
      end else if (plane_wait_q) begin
        stack_op   = prune ? STK_POP : STK_REPLACE;
        stack_addr = go_left ? right_child : left_child;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q       <= 1'b0;
      pcnt_q       <= '0;
      delay_q      <= '0;
      plane_wait_q <= 1'b0;
      for (int i = 0; i < int'(K); i++) query[i] <= '0;
    end else begin
      if (delay_q != '0) delay_q <= delay_q - 2'd1;
      if (in_fire) begin
        busy_q <= 1'b1;
        query  <= in_point;
      end
      if (busy_q && stack_empty && out_valid && out_ready) busy_q <= 1'b0;
      if (pts_rd) begin
        if (last_point) begin
          pcnt_q  <= '0;
          delay_q <= 2'd2;
        end else begin
          pcnt_q <= pcnt_q + AW'(1);
        end
      end
      if (busy_q && !stack_empty && !node_leaf && top_child)
        plane_wait_q <= !plane_wait_q;
    end
  end

  // Children of a node must lie inside the tree ROM.
  a_child_in_rom: assert property (@(posedge clk) disable iff (!rst_n)
    stack_op == STK_DESCEND |-> (32'(top_addr) * 2 + 2) < (32'd1 << DEPTH));
  // A new query is never accepted while a search is running.
  a_result_held: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid);

endmodule
