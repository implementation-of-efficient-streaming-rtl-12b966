// dbf_pkg: types and constants shared by the deblocking-filter actor.
//
// A pixel is an 8-bit sample. A block is 8x8 pixels and travels through
// the queues as 16 words of 32 bits: word 2*r holds row r, columns 0..3,
// and word 2*r+1 holds columns 4..7, with column c of the word in bits
// [8*(c%4)+7 : 8*(c%4)]. A filter line is the eight pixels p3 p2 p1 p0 | q0
// q1 q2 q3 that straddle one block edge.
//
// The 32-bit word matches the 32-bit width of the block memories; the packing
// order and the 8x8 block size used for the stream are this design's choices.
package dbf_pkg;

  localparam int PIX_W   = 8;
  localparam int BLK     = 8;            // block edge length in pixels
  localparam int WORD_W  = 32;           // queue / block-memory word
  localparam int PIX_PER_WORD = WORD_W / PIX_W;
  localparam int WORDS_PER_BLK = BLK * BLK / PIX_PER_WORD;   // 16

  typedef logic [PIX_W-1:0] pixel_t;
  typedef pixel_t [BLK-1:0] line_t;      // one row or column of a block

  // One filter line across an edge; index 0 is nearest the edge.
  typedef struct packed {
    pixel_t [3:0] p;
    pixel_t [3:0] q;
  } edge_line_t;

  // Limits that steer a filter decision.
  typedef struct packed {
    logic [7:0] alpha;
    logic [4:0] beta;
    logic [4:0] tc0;
    logic       enable;     // boundary strength above zero
  } thresh_t;

endpackage
