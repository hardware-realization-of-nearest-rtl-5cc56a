// tree_rom: memory holding the structure of a balanced k-d tree of up to
// DEPTH levels (2**DEPTH words, node n has its children at 2n+1 and 2n+2).
//
// Each word is { leaf, median, start, count }:
//   leaf   (1 bit)   node has no children and owns points
//   median (W bits)  signed splitting value, used by inner nodes only
//   start  (AW bits) address of the node's first point in the points ROM
//   count  (AW bits) number of points of the node, used by leaves only
// The read is combinational (distributed memory) so that the node addressed
// by the top of the node stack decides the engine's mode in the same cycle.
// The synchronous write port only loads the tree before queries are run;
// alternatively INIT_FILE, when not empty, names a $readmemh image (one hex
// word per line) that holds the tree from time zero.
module tree_rom #(
  parameter int unsigned W     = 16,
  parameter int unsigned AW    = 7,
  parameter int unsigned DEPTH = 5,
  parameter string       INIT_FILE = "",
  localparam int unsigned NW   = 1 + W + 2 * AW
) (
  input  logic             clk,
  input  logic             we,
  input  logic [DEPTH-1:0] waddr,
  input  logic [NW-1:0]    wdata,
  input  logic [DEPTH-1:0] raddr,
  output logic [NW-1:0]    rdata
);

  logic [NW-1:0] mem [2**DEPTH];

  // Optional pre-stored contents: loaded at time zero in simulation and
  // taken as the memory's initial value by FPGA synthesis.
  initial begin
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
