// tb_points_rom: fills the points memory with random words through the
// write port, then reads every address back in a random order and checks
// the word and the one-clock read latency against a copy kept here.
module tb_points_rom;
  localparam int unsigned W = 16, K = 3, AW = 7;
  logic clk = 1'b0;
  logic we;
  logic [AW-1:0] addr;
  logic [K*W-1:0] wdata, rdata;
  logic [K*W-1:0] model [2**AW];
  int checks = 0, failures = 0;

  points_rom #(.W(W), .K(K), .AW(AW)) dut (.clk, .we, .addr, .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1'b0; addr = '0; wdata = '0;
    for (int a = 0; a < 2**AW; a++) begin
      model[a] = {$urandom, $urandom};
      @(negedge clk); we = 1'b1; addr = AW'(a); wdata = model[a];
    end
    @(negedge clk); we = 1'b0;
    for (int n = 0; n < 3 * 2**AW; n++) begin
      int a, prev;
      a = $urandom_range(2**AW - 1);
      prev = int'(addr);
      @(negedge clk) addr = AW'(a);
      // the output still shows the previous address until the next edge
      #1;
      checks++;
      if (rdata !== model[prev]) begin failures++; $display("latency error at %0d", prev); end
      @(posedge clk); #1;
      checks++;
      if (rdata !== model[a]) begin
        failures++;
        $display("read %0d: got %h expected %h", a, rdata, model[a]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
