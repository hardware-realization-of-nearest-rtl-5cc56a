// tb_point_distance: drives random point pairs (and the extreme corners) and
// checks the registered squared Euclidean distance, the registered point and
// the valid bit one clock later against a 64-bit computation.
module tb_point_distance;
  localparam int unsigned W = 16, K = 3, DSW = 2 * W + 2 + 2;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, out_valid;
  logic signed [W-1:0] query [K], point [K], out_point [K];
  logic [DSW-1:0] out_dist;
  int checks = 0, failures = 0;

  point_distance #(.W(W), .K(K)) dut (.clk, .rst_n, .in_valid, .query, .point,
                                      .out_valid, .out_point, .out_dist);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 1'b0;
    for (int i = 0; i < K; i++) begin query[i] = '0; point[i] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 1000; n++) begin
      longint e;
      logic v;
      logic signed [W-1:0] p [K];
      @(negedge clk);
      v = (n < 2) ? 1'b1 : 1'($urandom);
      in_valid = v;
      for (int i = 0; i < K; i++) begin
        if (n == 0) begin query[i] = 16'sh7fff; point[i] = 16'sh8000; end
        else if (n == 1) begin query[i] = 16'sh8000; point[i] = 16'sh7fff; end
        else begin query[i] = W'($urandom); point[i] = W'($urandom); end
      end
      e = 0;
      for (int i = 0; i < K; i++) e += (longint'(query[i]) - longint'(point[i])) ** 2;
      p = point;
      @(posedge clk); #1;
      checks++;
      if (out_valid !== v) begin failures++; $display("valid mismatch"); end
      if (v) begin
        checks++;
        if (64'(out_dist) != e || out_point != p) begin
          failures++;
          $display("distance: got %0d expected %0d", out_dist, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
