// nns_config_check: testbench helper that builds one nns_top with the given
// sizes, loads random balanced k-d trees of NP points into it and checks
// random queries against a brute-force search. It owns its own clock and
// reset and reports through its ports when it is finished.
//
// The tree is built as in tb_nns_top: node n splits on dimension
// (level mod K) at the median of its sorted points, children at 2n+1 and
// 2n+2, leaves at the last of DEPTH levels or earlier at random, each leaf's
// points at consecutive addresses of the points memory. Coordinates are kept
// within +-2**28 so that the reference distances fit 64 bits for K <= 5.
module nns_config_check #(
  parameter int unsigned W     = 16,
  parameter int unsigned K     = 3,
  parameter int unsigned AW    = 7,
  parameter int unsigned DEPTH = 5,
  parameter int unsigned NP    = 100,
  parameter int unsigned TREES = 4,
  parameter int unsigned QUERIES = 40
) (
  output bit done,
  output int checks,
  output int failures
);
  localparam int unsigned NW = 1 + W + 2 * AW;
  localparam int unsigned NNODES = 2**DEPTH - 1;
  localparam longint RANGE = (W >= 30) ? (64'sd1 <<< 28) : ((64'sd1 <<< (W - 1)) - 1);

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, in_ready, out_valid, out_ready;
  logic signed [W-1:0] in_point [K], out_point [K];
  logic tree_we, pts_we;
  logic [DEPTH-1:0] tree_waddr;
  logic [NW-1:0] tree_wdata;
  logic [AW-1:0] pts_waddr;
  logic [K*W-1:0] pts_wdata;

  nns_top #(.W(W), .K(K), .AW(AW), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  logic signed [W-1:0] pts [NP][K];
  int perm [NP];
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

  function automatic logic signed [W-1:0] rnd_coord();
    longint v;
    v = longint'({$urandom, $urandom} % (2 * RANGE + 1)) - RANGE;
    return W'(v);
  endfunction

  task automatic write_node(int n, bit leaf, logic signed [W-1:0] med, int start, int count);
    tree_we = 1; tree_waddr = DEPTH'(n);
    tree_wdata = {leaf, med, AW'(start), AW'(count)};
    tick();
    tree_we = 0;
  endtask

  task automatic build_tree();
    for (int a = 0; a < NP; a++) perm[a] = a;
    for (int n = 0; n < NNODES; n++) used[n] = 0;
    used[0] = 1; lo_of[0] = 0; hi_of[0] = NP;
    for (int n = 0; n < NNODES; n++) begin
      int level, dim, lo, hi, mid;
      if (!used[n]) continue;
      level = $clog2(n + 2) - 1;
      dim = level % K;
      lo = lo_of[n]; hi = hi_of[n];
      if (level == DEPTH - 1 || hi - lo <= 1 || $urandom_range(99) < 15) begin
        write_node(n, 1'b1, '0, lo, hi - lo);
        continue;
      end
      for (int i = lo + 1; i < hi; i++) begin
        int key, j;
        key = perm[i]; j = i - 1;
        while (j >= lo && pts[perm[j]][dim] > pts[key][dim]) begin
          perm[j + 1] = perm[j]; j--;
        end
        perm[j + 1] = key;
      end
      mid = (lo + hi) / 2;
      write_node(n, 1'b0, pts[perm[mid]][dim], 0, 0);
      used[2*n+1] = 1; lo_of[2*n+1] = lo;  hi_of[2*n+1] = mid;
      used[2*n+2] = 1; lo_of[2*n+2] = mid; hi_of[2*n+2] = hi;
    end
    for (int a = 0; a < NP; a++) begin
      pts_we = 1; pts_waddr = AW'(a);
      for (int i = 0; i < K; i++) pts_wdata[i*W +: W] = pts[perm[a]][i];
      tick();
    end
    pts_we = 0;
  endtask

  initial begin
    logic signed [W-1:0] q [K];
    done = 0; checks = 0; failures = 0;
    in_valid = 0; out_ready = 0; tree_we = 0; pts_we = 0;
    tree_waddr = '0; tree_wdata = '0; pts_waddr = '0; pts_wdata = '0;
    for (int i = 0; i < K; i++) in_point[i] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    tick();
    for (int t = 0; t < TREES; t++) begin
      for (int a = 0; a < NP; a++) for (int i = 0; i < K; i++) pts[a][i] = rnd_coord();
      build_tree();
      for (int n = 0; n < QUERIES; n++) begin
        longint best, got;
        for (int i = 0; i < K; i++) q[i] = rnd_coord();
        in_valid = 1; in_point = q;
        while (!in_ready) tick();
        tick();
        in_valid = 0;
        while (!out_valid) tick();
        out_ready = 1;
        best = -1;
        for (int a = 0; a < NP; a++)
          if (best < 0 || sqd(pts[a], q) < best) best = sqd(pts[a], q);
        got = sqd(out_point, q);
        checks++;
        if (got != best) begin
          failures++;
          $display("W=%0d K=%0d AW=%0d DEPTH=%0d: distance %0d, expected %0d",
                   W, K, AW, DEPTH, got, best);
        end
        tick();
        out_ready = 0;
      end
    end
    done = 1;
  end
endmodule
