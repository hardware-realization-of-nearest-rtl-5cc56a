// tb_node_stack: issues random legal commands (descend, pop, replace, init,
// none) and compares the top entry and the empty flag after every clock
// with a queue-based model of the stack.
module tb_node_stack;
  import nns_pkg::*;
  localparam int unsigned DEPTH = 5, K = 3, DW = 2;
  typedef struct packed { logic [DEPTH-1:0] addr; logic child; logic [DW-1:0] depth; } ent_t;
  logic clk = 1'b0, rst_n = 1'b0;
  stack_op_e op;
  logic [DEPTH-1:0] new_addr, top_addr;
  logic [DW-1:0] new_depth, top_depth;
  logic top_child, empty;
  ent_t model [$];
  int checks = 0, failures = 0;
  int n_descend = 0, n_pop = 0, n_replace = 0, n_init = 0, max_fill = 0;

  node_stack #(.DEPTH(DEPTH), .K(K)) dut (.clk, .rst_n, .op, .new_addr, .new_depth,
                                          .top_addr, .top_child, .top_depth, .empty);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    checks++;
    if (empty !== (model.size() == 0)) begin
      failures++; $display("empty flag wrong, model size %0d", model.size());
    end else if (model.size() > 0) begin
      ent_t t;
      t = model[$];
      if (top_addr !== t.addr || top_child !== t.child || top_depth !== t.depth) begin
        failures++;
        $display("top {%0d,%0d,%0d} expected {%0d,%0d,%0d}", top_addr, top_child,
                 top_depth, t.addr, t.child, t.depth);
      end
    end
  endtask

  initial begin
    op = STK_NONE; new_addr = '0; new_depth = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    model.push_back('0);
    #1 check();
    for (int n = 0; n < 5000; n++) begin
      int r;
      @(negedge clk);
      new_addr  = DEPTH'($urandom);
      new_depth = DW'($urandom_range(K - 1));
      r = $urandom_range(99);
      if (model.size() == 0) op = (r < 80) ? STK_INIT : STK_NONE;
      else if (r < 40 && model.size() < DEPTH) op = STK_DESCEND;
      else if (r < 70) op = STK_POP;
      else if (r < 90) op = STK_REPLACE;
      else if (r < 93) op = STK_INIT;
      else op = STK_NONE;
      case (op)
        STK_DESCEND: begin
          model[$].child = 1'b1;
          model.push_back('{addr: new_addr, child: 1'b0, depth: new_depth});
          n_descend++;
        end
        STK_POP: begin void'(model.pop_back()); n_pop++; end
        STK_REPLACE: begin
          model[$] = '{addr: new_addr, child: 1'b0, depth: new_depth};
          n_replace++;
        end
        STK_INIT: begin model.delete(); model.push_back('0); n_init++; end
        default: ;
      endcase
      if (model.size() > max_fill) max_fill = model.size();
      @(posedge clk); #1;
      check();
    end
    checks++;
    if (max_fill != DEPTH || n_descend == 0 || n_replace == 0 || n_init == 0) begin
      failures++; $display("coverage: fill %0d", max_fill);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
