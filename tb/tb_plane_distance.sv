// tb_plane_distance: drives random and extreme coordinate/median pairs and
// checks the registered squared difference one clock later against a
// 64-bit computation.
module tb_plane_distance;
  localparam int unsigned W = 16, SW = 2 * W + 2;
  logic clk = 1'b0;
  logic signed [W-1:0] coord, median;
  logic [SW-1:0] sq_dist;
  int checks = 0, failures = 0;

  plane_distance #(.W(W)) dut (.clk, .coord, .median, .sq_dist);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      longint d, e;
      @(negedge clk);
      case (n)
        0: begin coord = 16'sh7fff; median = 16'sh8000; end
        1: begin coord = 16'sh8000; median = 16'sh7fff; end
        2: begin coord = 16'sd5;    median = 16'sd5;    end
        default: begin coord = W'($urandom); median = W'($urandom); end
      endcase
      d = longint'(coord) - longint'(median);
      e = d * d;
      @(posedge clk); #1;
      checks++;
      if (64'(sq_dist) != e) begin
        failures++;
        $display("(%0d-%0d)^2: got %0d expected %0d", coord, median, sq_dist, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
