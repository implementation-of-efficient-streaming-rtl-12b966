// block_memory: dual-port SRAM, DEPTH words of WIDTH bits (32 x 32 by
// default), one write port and one read port on the same clock.
//
// The deblocking-filter actor keeps neighbour pixels here between blocks:
// memory 1 holds the right-hand columns of the block to the left, memory 2
// the bottom rows of the block above. A write on a rising edge stores wdata
// at waddr; a read returns mem[raddr] one clock later on rdata (synchronous
// read, as in a block RAM). Reading an address in the cycle it is written
// returns the old contents.
//
// The 32 x 32-bit dual-port organisation follows the deblocking-filter
// architecture; the split into a write and a read port is this design's choice.
module block_memory #(
  parameter int DEPTH = 32,
  parameter int WIDTH = 32
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
