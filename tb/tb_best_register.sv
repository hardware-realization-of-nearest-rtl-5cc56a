// tb_best_register: streams random candidates, with clears and idle cycles
// mixed in, and checks the stored closest point and distance after every
// clock against a running minimum kept here (strictly-smaller rule).
module tb_best_register;
  localparam int unsigned W = 16, K = 3, DSW = 2 * W + 2 + 2;
  logic clk = 1'b0, rst_n = 1'b0;
  logic clear, cand_valid;
  logic signed [W-1:0] cand_point [K], best_point [K];
  logic [DSW-1:0] cand_dist, best_dist;
  logic signed [W-1:0] m_point [K];
  logic [DSW-1:0] m_dist;
  int checks = 0, failures = 0;

  best_register #(.W(W), .K(K)) dut (.clk, .rst_n, .clear, .cand_valid, .cand_point,
                                     .cand_dist, .best_point, .best_dist);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 1'b0; cand_valid = 1'b0; cand_dist = '0;
    for (int i = 0; i < K; i++) begin cand_point[i] = '0; m_point[i] = '0; end
    m_dist = '1;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      clear = ($urandom_range(40) == 0);
      cand_valid = 1'($urandom);
      // small distances so ties and equal values happen
      cand_dist = DSW'($urandom_range(300));
      for (int i = 0; i < K; i++) cand_point[i] = W'($urandom);
      if (clear) begin
        m_dist = '1;
        for (int i = 0; i < K; i++) m_point[i] = '0;
      end else if (cand_valid && cand_dist < m_dist) begin
        m_dist = cand_dist;
        m_point = cand_point;
      end
      @(posedge clk); #1;
      checks++;
      if (best_dist !== m_dist || best_point != m_point) begin
        failures++;
        $display("cycle %0d: best %0d expected %0d", n, best_dist, m_dist);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
