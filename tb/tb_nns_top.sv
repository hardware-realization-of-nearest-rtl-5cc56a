// tb_nns_top: end-to-end test of the nearest neighbour search engine at its
// default size (16-bit coordinates, 3 dimensions, 5-level / 31-node tree,
// 128-word points memory).
//
// For each of several random point sets the testbench builds a balanced k-d
// tree the way the engine expects it: node n splits its points on dimension
// (level mod K) at the median of the sorted subset (left half below, right
// half from the median up), children at 2n+1 and 2n+2, leaves at the last
// level or earlier at random, points of a leaf at consecutive addresses. It
// loads both memories through the load ports and sends random queries with
// random gaps, holding back out_ready at random. Each answer must be a stored
// point whose squared distance equals the brute-force minimum.
//
// Two directed trees check the latency: a root that is a leaf of P points
// answers P+3 clocks after the query is accepted; a root with two one-point
// leaves answers after 8 clocks (the stale-best check visits both leaves).
// Counted and required: leaf scans, empty leaves, descents, second children
// visited and pruned, delay-counter waits, full stack depth, input stalls and
// output back-pressure.
module tb_nns_top;
  import nns_pkg::*;
  localparam int unsigned W = 16, K = 3, AW = 7, DEPTH = 5;
  localparam int unsigned NW = 1 + W + 2 * AW;
  localparam int unsigned NNODES = 2**DEPTH - 1;
  localparam int unsigned MAXP = 2**AW;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, in_ready, out_valid, out_ready;
  logic signed [W-1:0] in_point [K], out_point [K];
  logic tree_we, pts_we;
  logic [DEPTH-1:0] tree_waddr;
  logic [NW-1:0] tree_wdata;
  logic [AW-1:0] pts_waddr;
  logic [K*W-1:0] pts_wdata;

  nns_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---- mechanism counters, sampled mid-cycle
  int n_leaf_scan = 0, n_empty_leaf = 0, n_descend = 0, n_second = 0, n_prune = 0;
  int n_delay_wait = 0, n_in_stall = 0, n_out_stall = 0, n_full_stack = 0;
  always @(negedge clk) if (rst_n) begin
    if (dut.u_ctrl.pts_rd && dut.u_ctrl.last_point) n_leaf_scan++;
    if (dut.u_ctrl.busy_q && !dut.stack_empty && dut.node_leaf && dut.node_count == '0) n_empty_leaf++;
    if (dut.stack_op == STK_DESCEND) n_descend++;
    if (dut.stack_op == STK_REPLACE) n_second++;
    if (dut.stack_op == STK_POP && !dut.node_leaf) n_prune++;
    if (dut.u_ctrl.busy_q && dut.stack_empty && dut.u_ctrl.delay_q != '0) n_delay_wait++;
    if (in_valid && !in_ready) n_in_stall++;
    if (out_valid && !out_ready) n_out_stall++;
    if (dut.u_stack.sp_q == DEPTH) n_full_stack++;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired: busy %0d sp %0d top %0d child %0d leaf %0d cnt %0d in_valid %0d out_valid %0d", dut.u_ctrl.busy_q, dut.u_stack.sp_q, dut.top_addr, dut.top_child, dut.node_leaf, dut.node_count, in_valid, out_valid);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- the point set and the tree built from it
  int np;
  logic signed [W-1:0] pts [MAXP][K];
  int perm [MAXP];
  int lo_of [NNODES], hi_of [NNODES];
  bit used [NNODES];

  task automatic tick();
    @(posedge clk); #1;
  endtask

  function automatic longint sqd(logic signed [W-1:0] a [K], logic signed [W-1:0] b [K]);
    longint s = 0;
    for (int i = 0; i < K; i++) s += (longint'(a[i]) - longint'(b[i])) ** 2;
    return s;
  endfunction

  task automatic write_node(int n, bit leaf, logic signed [W-1:0] med, int start, int count);
    tree_we = 1; tree_waddr = DEPTH'(n);
    tree_wdata = {leaf, med, AW'(start), AW'(count)};
    tick();
    tree_we = 0;
  endtask

  task automatic write_points();
    for (int a = 0; a < np; a++) begin
      pts_we = 1; pts_waddr = AW'(a);
      for (int i = 0; i < K; i++) pts_wdata[i*W +: W] = pts[perm[a]][i];
      tick();
    end
    pts_we = 0;
  endtask

  // Build a balanced k-d tree over pts[0..np-1]; early = chance (in %) of
  // stopping at an inner level, empty_pct = chance of an all-right split.
  task automatic build_tree(int early, int empty_pct);
    for (int a = 0; a < np; a++) perm[a] = a;
    for (int n = 0; n < NNODES; n++) used[n] = 0;
    // unreachable nodes hold random words that must never be read
    for (int n = 0; n < NNODES; n++) write_node(n, 1'($urandom), W'($urandom), $urandom, $urandom);
    used[0] = 1; lo_of[0] = 0; hi_of[0] = np;
    for (int n = 0; n < NNODES; n++) begin
      int level, dim, lo, hi, mid;
      if (!used[n]) continue;
      level = $clog2(n + 2) - 1;
      dim = level % K;
      lo = lo_of[n]; hi = hi_of[n];
      if (level == DEPTH - 1 || hi - lo <= 1 || $urandom_range(99) < early) begin
        write_node(n, 1'b1, W'($urandom), lo, hi - lo);
        continue;
      end
      // insertion sort of perm[lo..hi-1] on coordinate dim
      for (int i = lo + 1; i < hi; i++) begin
        int key, j;
        key = perm[i]; j = i - 1;
        while (j >= lo && pts[perm[j]][dim] > pts[key][dim]) begin
          perm[j + 1] = perm[j]; j--;
        end
        perm[j + 1] = key;
      end
      // now and then all points go right, leaving an empty left leaf
      mid = ($urandom_range(99) < empty_pct) ? lo : (lo + hi) / 2;
      write_node(n, 1'b0, pts[perm[mid]][dim], 0, 0);
      used[2*n+1] = 1; lo_of[2*n+1] = lo;  hi_of[2*n+1] = mid;
      used[2*n+2] = 1; lo_of[2*n+2] = mid; hi_of[2*n+2] = hi;
    end
    write_points();
  endtask

  // Send one query, wait for the answer, check it; returns the clocks from
  // acceptance to the first out_valid.
  task automatic query(logic signed [W-1:0] q [K], bit stall_out,
                       logic signed [W-1:0] next_q [K], output int lat);
    longint best, got;
    bit member;
    in_valid = 1; in_point = q;
    while (!in_ready) tick();
    tick();
    in_valid = 0;
    lat = 1;
    out_ready = 0;
    while (!out_valid) begin tick(); lat++; end
    if (stall_out) begin
      // the next query is already offered; it must wait for this result
      in_valid = 1; in_point = next_q;
      repeat ($urandom_range(1, 3)) begin
        checks++;
        if (in_ready) begin failures++; $display("query accepted while busy"); end
        tick();
      end
    end
    out_ready = 1;
    best = -1;
    for (int a = 0; a < np; a++)
      if (best < 0 || sqd(pts[a], q) < best) best = sqd(pts[a], q);
    got = sqd(out_point, q);
    member = 0;
    for (int a = 0; a < np; a++) if (pts[a] == out_point) member = 1;
    checks++;
    if (got != best || !member) begin
      failures++;
      $display("query (%0d,%0d,%0d): got (%0d,%0d,%0d) d=%0d, expected d=%0d member=%0d",
               q[0], q[1], q[2], out_point[0], out_point[1], out_point[2], got, best, member);
    end
    tick();
    out_ready = 0;
  endtask

  initial begin
    logic signed [W-1:0] q [K];
    int lat, range;
    in_valid = 0; out_ready = 0; tree_we = 0; pts_we = 0;
    tree_waddr = '0; tree_wdata = '0; pts_waddr = '0; pts_wdata = '0;
    for (int i = 0; i < K; i++) in_point[i] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    tick();

    // ---- directed: root is a leaf of P points
    np = 9;
    for (int a = 0; a < np; a++) for (int i = 0; i < K; i++) pts[a][i] = W'($urandom);
    for (int a = 0; a < np; a++) perm[a] = a;
    write_node(0, 1'b1, '0, 0, np);
    write_points();
    for (int i = 0; i < K; i++) q[i] = W'($urandom);
    query(q, 0, q, lat);
    checks++;
    if (lat != np + 3) begin failures++; $display("leaf-root latency %0d, expected %0d", lat, np + 3); end

    // ---- directed: root with two one-point leaves
    np = 2;
    pts[0] = '{-16'sd10, 16'sd0, 16'sd0};
    pts[1] = '{16'sd10, 16'sd0, 16'sd0};
    for (int a = 0; a < np; a++) perm[a] = a;
    write_node(0, 1'b0, 16'sd0, 0, 0);
    write_node(1, 1'b1, '0, 0, 1);
    write_node(2, 1'b1, '0, 1, 1);
    write_points();
    q = '{-16'sd9, 16'sd1, 16'sd1};
    query(q, 0, q, lat);
    checks++;
    if (lat != 8) begin failures++; $display("two-leaf latency %0d, expected 8", lat); end

    // ---- random trees; the first is the reference case of 100 points
    for (int t = 0; t < 40; t++) begin
      np = (t == 0) ? 100 : $urandom_range(1, MAXP - 1);
      range = (t % 3 == 0) ? 40 : (t % 3 == 1) ? 2000 : 32767;
      for (int a = 0; a < np; a++)
        for (int i = 0; i < K; i++) pts[a][i] = W'($urandom_range(2 * range) - range);
      build_tree((t % 4 == 0) ? 0 : 25, (t % 5 == 2) ? 10 : 0);
      for (int i = 0; i < K; i++) q[i] = pts[$urandom_range(np - 1)][i];
      for (int n = 0; n < 60; n++) begin
        logic signed [W-1:0] nq [K];
        for (int i = 0; i < K; i++) nq[i] = W'($urandom_range(2 * range + 20) - range - 10);
        // sometimes offer the next query while this one's result is held
        query(q, (n != 59) && 1'($urandom), nq, lat);
        q = nq;
      end
    end

    // ---- mechanism coverage
    $display("leaf scans %0d, empty leaves %0d, descents %0d, second children %0d, prunes %0d",
             n_leaf_scan, n_empty_leaf, n_descend, n_second, n_prune);
    $display("delay waits %0d, full stack %0d, input stalls %0d, output stalls %0d",
             n_delay_wait, n_full_stack, n_in_stall, n_out_stall);
    checks++; if (n_leaf_scan == 0) begin failures++; $display("no leaf scan"); end
    checks++; if (n_empty_leaf == 0) begin failures++; $display("no empty leaf"); end
    checks++; if (n_descend == 0) begin failures++; $display("no descent"); end
    checks++; if (n_second == 0) begin failures++; $display("no second child"); end
    checks++; if (n_prune == 0) begin failures++; $display("no prune"); end
    checks++; if (n_delay_wait == 0) begin failures++; $display("no delay wait"); end
    checks++; if (n_full_stack == 0) begin failures++; $display("stack never full"); end
    checks++; if (n_in_stall == 0) begin failures++; $display("no input stall"); end
    checks++; if (n_out_stall == 0) begin failures++; $display("no output stall"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
