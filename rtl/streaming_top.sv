// streaming_top: a clock-gated streaming stage, input queue -> deblocking
// filter actor -> output queue, plus a double-edge-triggered register bank.
//
// The actor and the two queue ports next to it run on a gated copy of clk.
// A clock enabler watches the output queue's FULL (F) and ALMOST-FULL (AF)
// flags: when the queue is almost full the actor has nothing useful to do,
// so the enabler drops the enable and the clock buffer stops the clock of
// the actor, of the output queue's write side and of the input queue's read
// side. When the consumer has drained the queue the clock resumes and the
// actor carries on where it stopped; no data is lost and, as long as the
// consumer keeps up, no throughput either.
//
// Ports:
//   in_wr/in_data/in_full    producer side of the input queue (free clock);
//   in_almost_full           AF of the input queue, for the clock enabler of
//                            an upstream actor;
//   out_rd/out_data/out_empty consumer side of the output queue (free clock,
//                            first-word fall-through);
//   qp, bs, chroma           filter settings (see deblocking_filter);
//   actor_en, actor_clk      the enable and the gated clock, for observation;
//   blk_done                 one gated-clock pulse per filtered block;
//   det_d/det_q              DET register bank clocked by clk, sampling on
//                            both edges (a separate block: the filter chain
//                            does not use it);
//   det_latch_q              the same bank in its latch-level form
//                            (det_latch_ff), fed by the same det_d.
// Timing: the enable reaches the clock buffer two rising edges after the
// flags change, so the actor can still write two words after AF rises;
// Q_AF_LEVEL must leave that much room below Q_DEPTH.
//
// The queue-actor-queue arrangement with controller, D flip-flop and clock
// buffer follows the clock-gating scheme, and the DET register its DET
// flip-flop. Queue depth, AF level and the DET bank's width are this
// design's choices.
module streaming_top
  import dbf_pkg::*;
#(
  parameter int Q_DEPTH        = 16,
  parameter int Q_AF_LEVEL     = 12,
  parameter int FRAME_W_BLOCKS = 4,
  parameter int FRAME_H_BLOCKS = 4,
  parameter int DET_WIDTH      = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [5:0]           qp,
  input  logic [1:0]           bs,
  input  logic                 chroma,
  input  logic                 in_wr,
  input  logic [WORD_W-1:0]    in_data,
  output logic                 in_full,
  output logic                 in_almost_full,
  input  logic                 out_rd,
  output logic [WORD_W-1:0]    out_data,
  output logic                 out_empty,
  output logic                 actor_en,
  output logic                 actor_clk,
  output logic                 blk_done,
  input  logic [DET_WIDTH-1:0] det_d,
  output logic [DET_WIDTH-1:0] det_q,
  output logic [DET_WIDTH-1:0] det_latch_q
);
  logic              gclk;
  logic [WORD_W-1:0] a_in_data, a_out_data;
  logic              a_in_empty, a_in_rd, a_out_wr;
  logic              q2_full, q2_af;

  queue #(.WIDTH(WORD_W), .DEPTH(Q_DEPTH), .AF_LEVEL(Q_AF_LEVEL)) u_q_in (
    .wclk(clk), .rclk(gclk), .rst_n,
    .wr_en(in_wr), .din(in_data),
    .rd_en(a_in_rd), .dout(a_in_data), .empty(a_in_empty),
    .full(in_full), .almost_full(in_almost_full)
  );

  deblocking_filter #(
    .FRAME_W_BLOCKS(FRAME_W_BLOCKS), .FRAME_H_BLOCKS(FRAME_H_BLOCKS)
  ) u_actor (
    .clk(gclk), .rst_n, .qp, .bs, .chroma,
    .in_data(a_in_data), .in_empty(a_in_empty), .in_rd(a_in_rd),
    .out_data(a_out_data), .out_full(q2_full), .out_wr(a_out_wr),
    .blk_done
  );

  queue #(.WIDTH(WORD_W), .DEPTH(Q_DEPTH), .AF_LEVEL(Q_AF_LEVEL)) u_q_out (
    .wclk(gclk), .rclk(clk), .rst_n,
    .wr_en(a_out_wr), .din(a_out_data),
    .rd_en(out_rd), .dout(out_data), .empty(out_empty),
    .full(q2_full), .almost_full(q2_af)
  );

  clock_enabler u_enabler (
    .clk, .rst_n, .full(q2_full), .almost_full(q2_af), .en_q(actor_en)
  );

  clock_buffer u_bufgce (.clk, .ce(actor_en), .gclk);

  assign actor_clk = gclk;

  det_ff #(.WIDTH(DET_WIDTH)) u_det (.clk, .rst_n, .d(det_d), .q(det_q));

  det_latch_ff #(.WIDTH(DET_WIDTH)) u_det_latch (.clk, .d(det_d), .q(det_latch_q));

endmodule
