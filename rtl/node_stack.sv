// node_stack: the explicit stack that replaces recursion in the k-d tree
// search. It is an array of DEPTH registers plus a register counting the
// entries (the top pointer). Each entry records one node on the path from the
// root to the node being processed:
//   addr   node address in the tree ROM
//   child  0: the first child is next, 1: the second child may be next
//   depth  the node's splitting dimension, cycling 0..K-1
// One command per clock (nns_pkg::stack_op_e):
//   STK_DESCEND  top.child := 1 and push { new_addr, 0, new_depth }
//   STK_POP      remove the top entry
//   STK_REPLACE  top := { new_addr, 0, new_depth } (second child takes the
//                place of its finished parent)
//   STK_INIT     stack := { {0, 0, 0} }, the root as the sole entry
// The top entry is read combinationally. Reset leaves the stack in the STK_INIT
// state. The published description defines the entry contents and the replace-instead-of-
// push rule; the capacity of one entry per tree level is this design's choice.
module node_stack
  import nns_pkg::*;
#(
  parameter int unsigned DEPTH = 5,
  parameter int unsigned K     = 3,
  localparam int unsigned DW   = dim_width(K),
  localparam int unsigned PW   = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  stack_op_e        op,
  input  logic [DEPTH-1:0] new_addr,
  input  logic [DW-1:0]    new_depth,
  output logic [DEPTH-1:0] top_addr,
  output logic             top_child,
  output logic [DW-1:0]    top_depth,
  output logic             empty
);

  typedef struct packed {
    logic [DEPTH-1:0] addr;
    logic             child;
    logic [DW-1:0]    depth;
  } entry_t;

  entry_t          stack_q [DEPTH];
  logic [PW-1:0]   sp_q;        // number of valid entries
  logic [PW-1:0]   top_idx;
  entry_t          top;
  entry_t          new_entry;

  assign top_idx   = sp_q - PW'(1);
  assign empty     = (sp_q == '0);
  assign top       = empty ? '0 : stack_q[top_idx];
  assign top_addr  = top.addr;
  assign top_child = top.child;
  assign top_depth = top.depth;
  assign new_entry = '{addr: new_addr, child: 1'b0, depth: new_depth};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sp_q <= PW'(1);
      for (int i = 0; i < int'(DEPTH); i++) stack_q[i] <= '0;
    end else begin
      unique case (op)
        STK_DESCEND: begin
          stack_q[top_idx].child <= 1'b1;
          stack_q[sp_q]          <= new_entry;
          sp_q                   <= sp_q + PW'(1);
        end
        STK_POP:     sp_q <= sp_q - PW'(1);
        STK_REPLACE: stack_q[top_idx] <= new_entry;
        STK_INIT: begin
          stack_q[0] <= '0;
          sp_q       <= PW'(1);
        end
        default: ;
      endcase
    end
  end

  // A tree of DEPTH levels never needs more than DEPTH entries.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    op == STK_DESCEND |-> !empty && sp_q < PW'(DEPTH));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
    (op == STK_POP || op == STK_REPLACE) |-> !empty);

endmodule
