// points_rom: memory holding the coordinates of every point stored in the
// k-d tree. Points that belong to the same leaf occupy consecutive addresses,
// so a leaf is read by counting up from its start address.
//
// It is a single-port memory with a registered read, the shape of an FPGA
// block RAM: rdata shows the word at addr one clock after addr is presented.
// A write (we=1) stores wdata at addr; it is only used to put the point set
// in place before queries are run, the search itself only reads. The word
// holds K signed coordinates of W bits, coordinate 0 in the low bits.
// 2**AW words. Contents are not reset. INIT_FILE, when not empty, names a
// $readmemh image (one hex word per line) holding the pre-stored points.
module points_rom #(
  parameter int unsigned W  = 16,
  parameter int unsigned K  = 3,
  parameter int unsigned AW = 7,
  parameter string       INIT_FILE = ""
) (
  input  logic              clk,
  input  logic              we,
  input  logic [AW-1:0]     addr,
  input  logic [K*W-1:0]    wdata,
  output logic [K*W-1:0]    rdata
);

  logic [K*W-1:0] mem [2**AW];

  // Optional pre-stored contents: loaded at time zero in simulation and
  // taken as the memory's initial value by FPGA synthesis.
  initial begin
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    rdata <= mem[addr];
  end

endmodule
