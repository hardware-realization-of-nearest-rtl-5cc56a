// tb_nns_ctrl: drives the controller's stack-top, tree-word and distance
// inputs directly and checks its commands cycle by cycle, over many rounds
// with random values:
//   idle and query acceptance, first-child choice (left on smaller, right
//   otherwise), the two-clock second-child check with prune or replace,
//   leaf scanning (one address per clock, pop on the last point), the empty
//   leaf, and the final phase: out_valid only after the two-clock delay, held
//   under back-pressure, stack re-initialised when the result is taken.
module tb_nns_ctrl;
  import nns_pkg::*;
  localparam int unsigned W = 16, K = 3, AW = 7, DEPTH = 5, DW = 2, SW = 34, DSW = 36;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, in_ready, out_valid, out_ready;
  logic signed [W-1:0] in_point [K], query [K];
  stack_op_e stack_op;
  logic [DEPTH-1:0] stack_addr, top_addr;
  logic [DW-1:0] stack_depth, top_depth;
  logic top_child, stack_empty;
  logic node_leaf;
  logic signed [W-1:0] node_median, plane_coord, plane_median;
  logic [AW-1:0] node_start, node_count, pts_addr;
  logic pts_rd, best_clear;
  logic [SW-1:0] plane_dist;
  logic [DSW-1:0] best_dist;
  int checks = 0, failures = 0;

  nns_ctrl #(.W(W), .K(K), .AW(AW), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("%0t: %s", $time, what);
    end
  endtask

  // advance one clock; inputs change only after the edge has been taken
  task automatic tick();
    @(posedge clk); #1;
  endtask

  // evaluate outputs just before the next rising edge
  task automatic settle();
    @(negedge clk); #1;
  endtask

  logic signed [W-1:0] q [K];

  initial begin
    in_valid = 0; out_ready = 0; top_addr = 0; top_depth = 0; top_child = 0;
    stack_empty = 0; node_leaf = 0; node_median = 0; node_start = 0; node_count = 0;
    plane_dist = 0; best_dist = '1;
    for (int i = 0; i < K; i++) in_point[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 300; round++) begin
      int a, d, c, s;
      // ---- idle, accept a query
      settle();
      expect_true(in_ready && !out_valid && stack_op == STK_NONE && !pts_rd, "idle state");
      for (int i = 0; i < K; i++) begin q[i] = W'($urandom); in_point[i] = q[i]; end
      in_valid = 1;
      #1 expect_true(best_clear, "best_clear on accept");
      tick(); in_valid = 0;
      expect_true(!in_ready && query == q, "query captured, busy");
      // ---- first child
      settle();
      a = $urandom_range(14); d = $urandom_range(K - 1);
      top_addr = DEPTH'(a); top_depth = DW'(d); top_child = 0; node_leaf = 0;
      node_median = (round % 5 == 0) ? q[d] : W'($urandom);
      #1;
      expect_true(stack_op == STK_DESCEND, "descend command");
      expect_true(int'(stack_addr) == ((q[d] < node_median) ? 2*a+1 : 2*a+2), "first child choice");
      expect_true(int'(stack_depth) == ((d == K-1) ? 0 : d+1), "next depth");
      expect_true(plane_coord == q[d] && plane_median == node_median, "plane operands");
      // ---- second child check, two clocks
      tick(); settle();
      top_child = 1;
      #1 expect_true(stack_op == STK_NONE, "plane check first clock waits");
      tick(); settle();
      plane_dist = SW'($urandom_range(1000));
      best_dist = (round % 3 == 0) ? DSW'(plane_dist) : DSW'($urandom_range(1000));
      #1;
      if (best_dist <= DSW'(plane_dist))
        expect_true(stack_op == STK_POP, "prune pops");
      else begin
        expect_true(stack_op == STK_REPLACE, "replace with second child");
        expect_true(int'(stack_addr) == ((q[d] < node_median) ? 2*a+2 : 2*a+1), "second child address");
      end
      tick();
      // ---- empty leaf
      settle();
      node_leaf = 1; node_count = 0; top_child = 0;
      #1 expect_true(stack_op == STK_POP && !pts_rd, "empty leaf popped");
      tick();
      // ---- leaf with c points
      c = $urandom_range(1, 6); s = $urandom_range(100);
      node_count = AW'(c); node_start = AW'(s);
      for (int p = 0; p < c; p++) begin
        settle();
        expect_true(pts_rd && pts_addr == AW'(s + p), "leaf point address");
        expect_true(stack_op == ((p == c-1) ? STK_POP : STK_NONE), "pop on last point");
        tick();
      end
      // ---- final phase: wait two clocks for the delay counter
      stack_empty = 1; node_leaf = 0;
      out_ready = 1'($urandom);
      for (int t = 0; t < 2; t++) begin
        settle();
        expect_true(!out_valid && stack_op == STK_NONE, "result held back by delay");
        tick();
      end
      for (int t = 0; t < 3 && !out_ready; t++) begin
        settle();
        expect_true(out_valid && stack_op == STK_NONE, "result held under back-pressure");
        tick();
      end
      settle();
      out_ready = 1; #1;
      expect_true(out_valid && stack_op == STK_INIT, "result taken, stack init");
      tick();
      stack_empty = 0; out_ready = 0; top_addr = 0; top_child = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
