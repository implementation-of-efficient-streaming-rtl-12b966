// queue: lossless FIFO between two actors, with FULL (F) and ALMOST-FULL
// (AF) flags for the clock enabler.
//
// The write side runs on wclk and the read side on rclk, as the queue in the
// clock-gating scheme has separate write and read clock pins: one of them is
// the free-running clock and the other the gated clock of the neighbouring
// actor. Both clocks are taken to come from the same source (a gated copy of
// it), so the two pointers are compared directly without synchronisers; this
// queue is not meant for unrelated clock domains.
//
// Interface: wr_en/din write a word on a rising wclk edge unless full.
// dout shows the oldest word whenever empty is low (first-word fall-through);
// rd_en on a rising rclk edge drops it. full is F, almost_full is AF, which
// is raised while at least AF_LEVEL words are stored. Writes to a full queue
// and reads from an empty one are ignored (and flagged by assertions).
//
// The F and AF flags follow the scheme; depth, width and AF level are this
// design's choices. AF_LEVEL must leave room for the writes that the actor
// still makes while its clock is being switched off (two cycles here).
module queue #(
  parameter int WIDTH    = 32,
  parameter int DEPTH    = 16,
  parameter int AF_LEVEL = 12
) (
  input  logic             wclk,
  input  logic             rclk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] din,
  input  logic             rd_en,
  output logic [WIDTH-1:0] dout,
  output logic             empty,
  output logic             full,
  output logic             almost_full
);
  localparam int AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wptr, rptr;
  logic [AW:0]      count;

  assign count       = wptr - rptr;
  assign empty       = (count == '0);
  assign full        = (count == (AW+1)'(DEPTH));
  assign almost_full = (count >= (AW+1)'(AF_LEVEL));
  assign dout        = mem[rptr[AW-1:0]];

  always_ff @(posedge wclk or negedge rst_n) begin
    if (!rst_n)
      wptr <= '0;
    else if (wr_en && !full)
      wptr <= wptr + 1'b1;
  end

  always_ff @(posedge wclk) begin
    if (wr_en && !full)
      mem[wptr[AW-1:0]] <= din;
  end

  always_ff @(posedge rclk or negedge rst_n) begin
    if (!rst_n)
      rptr <= '0;
    else if (rd_en && !empty)
      rptr <= rptr + 1'b1;
  end

  // The actors must respect the flags; a lossless queue never drops a word.
  a_no_overflow:  assert property (@(posedge wclk) disable iff (!rst_n) !(wr_en && full));
  a_no_underflow: assert property (@(posedge rclk) disable iff (!rst_n) !(rd_en && empty));

endmodule
