// ram_transposer: 8x8 pixel store written by rows and read by columns.
//
// After the horizontal filter units have processed the rows of a block, the
// rows are written here, LANES rows per clock (rows wrow .. wrow+LANES-1);
// the vertical filter units then read LANES columns per clock (columns
// rcol .. rcol+LANES-1), so the vertical pass reuses the horizontally
// filtered data without a round trip to external memory. Writes take effect
// on the rising edge; reads are combinational.
//
// The row-in, column-out role follows the deblocking-filter architecture;
// the register-array implementation and the two-lane ports (one lane per
// filter unit of a pair) are this design's choices.
module ram_transposer
  import dbf_pkg::*;
#(
  parameter int LANES = 2
) (
  input  logic                  clk,
  input  logic                  we,
  input  logic [2:0]            wrow,
  input  line_t [LANES-1:0]     wdata,   // wdata[l][c] = pixel (wrow+l, c)
  input  logic [2:0]            rcol,
  output line_t [LANES-1:0]     rdata    // rdata[l][r] = pixel (r, rcol+l)
);
  pixel_t store [BLK][BLK];

  always_ff @(posedge clk) begin
    if (we)
      for (int l = 0; l < LANES; l++)
        for (int c = 0; c < BLK; c++)
          store[3'(int'(wrow) + l)][c] <= wdata[l][c];
  end

  always_comb begin
    for (int l = 0; l < LANES; l++)
      for (int r = 0; r < BLK; r++)
        rdata[l][r] = store[r][3'(int'(rcol) + l)];
  end

endmodule
