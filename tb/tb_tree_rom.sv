// tb_tree_rom: writes random node words to every address of the tree memory
// and checks that the combinational read port returns each of them in the
// same cycle the address is presented.
module tb_tree_rom;
  localparam int unsigned W = 16, AW = 7, DEPTH = 5, NW = 1 + W + 2 * AW;
  logic clk = 1'b0;
  logic we;
  logic [DEPTH-1:0] waddr, raddr;
  logic [NW-1:0] wdata, rdata;
  logic [NW-1:0] model [2**DEPTH];
  int checks = 0, failures = 0;

  tree_rom #(.W(W), .AW(AW), .DEPTH(DEPTH)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1'b0; waddr = '0; wdata = '0; raddr = '0;
    for (int a = 0; a < 2**DEPTH; a++) begin
      model[a] = NW'({$urandom, $urandom});
      @(negedge clk); we = 1'b1; waddr = DEPTH'(a); wdata = model[a];
    end
    @(negedge clk); we = 1'b0;
    for (int n = 0; n < 200; n++) begin
      int a;
      a = $urandom_range(2**DEPTH - 1);
      raddr = DEPTH'(a);
      #1;
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
