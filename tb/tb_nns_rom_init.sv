// tb_nns_rom_init: runs the engine on a tree that is pre-stored through the
// memory image parameters instead of the load ports. The images hold twelve
// 2-D points (z = 0) in a three-level tree: the root splits x at 6, its
// children split y at 5 and 6, and four leaves hold three points each.
//
// The query (5,3,0) must return (4,4,0) at squared distance 2 (it ties with
// (6,4,0); the point met first is kept) after visiting two of the four
// leaves: the left-left leaf, then the right-left leaf across the root's
// plane at distance 1, while the planes at distance 4 and 9 are pruned.
// Further random queries are checked against a brute-force search.
module tb_nns_rom_init;
  localparam int unsigned W = 16, K = 3, AW = 7, DEPTH = 5, NP = 12;
  localparam int unsigned NW = 1 + W + 2 * AW;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, in_ready, out_valid, out_ready;
  logic signed [W-1:0] in_point [K], out_point [K];
  logic tree_we = 1'b0, pts_we = 1'b0;
  logic [DEPTH-1:0] tree_waddr = '0;
  logic [NW-1:0] tree_wdata = '0;
  logic [AW-1:0] pts_waddr = '0;
  logic [K*W-1:0] pts_wdata = '0;
  int checks = 0, failures = 0;
  int leaves = 0;

  nns_top #(.TREE_INIT("tb/nns_example_tree.hex"),
            .POINTS_INIT("tb/nns_example_points.hex")) dut (.*);

  always #5 clk = ~clk;

  // leaves whose scan completed
  always @(negedge clk) if (rst_n && dut.u_ctrl.pts_rd && dut.u_ctrl.last_point) leaves++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  const int px [NP] = '{1, 2, 3, 4, 6, 7, 8, 9, 5, 2, 8, 6};
  const int py [NP] = '{7, 2, 9, 4, 1, 6, 3, 8, 5, 5, 9, 4};

  task automatic tick();
    @(posedge clk); #1;
  endtask

  task automatic run(int x, int y, int z, output int gx, output int gy, output int gz);
    in_point = '{W'(x), W'(y), W'(z)};
    in_valid = 1;
    while (!in_ready) tick();
    tick();
    in_valid = 0;
    while (!out_valid) tick();
    gx = out_point[0]; gy = out_point[1]; gz = out_point[2];
    out_ready = 1;
    tick();
    out_ready = 0;
  endtask

  initial begin
    int gx, gy, gz;
    in_valid = 0; out_ready = 0;
    for (int i = 0; i < K; i++) in_point[i] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    tick();
    leaves = 0;
    run(5, 3, 0, gx, gy, gz);
    checks++;
    if (gx != 4 || gy != 4 || gz != 0) begin
      failures++; $display("(5,3,0) -> (%0d,%0d,%0d), expected (4,4,0)", gx, gy, gz);
    end
    checks++;
    if (leaves != 2) begin failures++; $display("%0d leaves visited, expected 2", leaves); end
    for (int n = 0; n < 300; n++) begin
      int x, y, z, best, got;
      x = $urandom_range(24) - 7; y = $urandom_range(24) - 7; z = $urandom_range(6) - 3;
      run(x, y, z, gx, gy, gz);
      best = -1;
      for (int a = 0; a < NP; a++) begin
        int d;
        d = (px[a] - x) ** 2 + (py[a] - y) ** 2 + z ** 2;
        if (best < 0 || d < best) best = d;
      end
      got = (gx - x) ** 2 + (gy - y) ** 2 + (gz - z) ** 2;
      checks++;
      if (got != best || gz != 0) begin
        failures++; $display("(%0d,%0d,%0d): distance %0d, expected %0d", x, y, z, got, best);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
