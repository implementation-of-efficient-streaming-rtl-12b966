// deblocking_filter: the streaming actor ("actor A") that smooths block
// artefacts out of a picture, one 8x8 block at a time.
//
// Blocks arrive in raster order from the input queue, 16 words of four
// pixels each (see dbf_pkg), for a picture FRAME_W_BLOCKS blocks wide and
// FRAME_H_BLOCKS blocks high. For every block the actor filters four edges:
// its left edge and the edge through its middle column (horizontal pass, on
// rows), then its top edge and the edge through its middle row (vertical
// pass, on columns). The left and top edges need pixels of the neighbouring
// blocks: Block Memory 1 holds columns 4..7 of the block to the left, Block
// Memory 2 holds rows 4..7 of the block above for every block column. Edges
// on the picture border are not filtered.
//
// Per block, an administration state machine runs five phases:
//   CTX  (9 cycles)   read the neighbour pixels of both block memories;
//   LOAD (16 words)   take the block from the input queue into the block
//                     buffer, waiting while the queue is empty;
//   H    (8 cycles)   Splitter 1 hands even rows to Filter Unit 1 and odd rows
//                     to Filter Unit 2; each row is filtered at its left edge,
//                     then at column 4; Combine 1 writes each row pair to the
//                     RAM transposer;
//   V    (8 cycles)   Splitter 2 hands even/odd columns read from the
//                     transposer to Filter Units 3/4; top edge, then row 4;
//                     Combine 2 writes the columns back to the block buffer;
//   OUT  (16 words)   write the block to the output queue, waiting while it
//                     is full, and store its right columns and bottom rows
//                     in the block memories for the next blocks.
// That is 57 cycles per block when neither queue holds the actor up. The
// thresholds come from QP and bS through threshold_derivation; chroma picks
// the chroma filters. qp, bs and chroma must be stable for a whole block.
//
// Timing: clk is the actor's gated clock; every state change happens on it,
// so while the clock enabler holds it low the actor freezes in place. in_rd
// and out_wr are qualified by !in_empty and !out_full, so the actor never
// reads an empty or writes a full queue.
//
// From the deblocking-filter architecture: two block memories of 32 x 32
// bits for left and upper neighbours, four filter units (two horizontal, two
// vertical) each with luma and chroma filters, threshold derivation from QP,
// splitters, combiners, a block buffer, a RAM transposer and an
// administration unit. This design's own choices: the word format, the
// phase schedule above, the H.264 normal filter, and one simplification:
// the neighbour's side of a left or top edge is used as read-only context,
// so pixels of an already emitted block are not revised.
module deblocking_filter
  import dbf_pkg::*;
#(
  parameter int FRAME_W_BLOCKS = 4,   // Block Memory 2 holds 8 words per block column
  parameter int FRAME_H_BLOCKS = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [5:0]        qp,
  input  logic [1:0]        bs,
  input  logic              chroma,
  // input queue (first-word fall-through read side)
  input  logic [WORD_W-1:0] in_data,
  input  logic              in_empty,
  output logic              in_rd,
  // output queue (write side)
  output logic [WORD_W-1:0] out_data,
  input  logic              out_full,
  output logic              out_wr,
  // one pulse per finished block
  output logic              blk_done
);
  if (FRAME_W_BLOCKS < 1 || FRAME_W_BLOCKS > 4 || FRAME_H_BLOCKS < 1) begin : g_size_check
    $error("deblocking_filter: Block Memory 2 holds at most 4 block columns");
  end

  localparam int CW = (FRAME_W_BLOCKS > 1) ? $clog2(FRAME_W_BLOCKS) : 1;
  localparam int RW = (FRAME_H_BLOCKS > 1) ? $clog2(FRAME_H_BLOCKS) : 1;

  typedef enum logic [2:0] {P_CTX, P_LOAD, P_H, P_V, P_OUT} phase_t;

  phase_t     phase;
  logic [4:0] cnt;
  logic [CW-1:0] blk_col;
  logic [RW-1:0] blk_row;

  pixel_t blk  [BLK][BLK];        // block buffer, [row][col]
  pixel_t ctxl [BLK][4];          // left neighbour, rows 0..7, columns 4..7
  pixel_t ctxt [4][BLK];          // upper neighbour, rows 4..7, columns 0..7
  line_t  lane_reg [2];           // a row or column between the two edge steps

  // ---------------------------------------------------------------- memories
  logic              m1_we, m2_we;
  logic [4:0]        m1_waddr, m2_waddr, m1_raddr, m2_raddr;
  logic [WORD_W-1:0] m1_rdata, m2_rdata;

  block_memory #(.DEPTH(32), .WIDTH(WORD_W)) u_mem1 (
    .clk, .we(m1_we), .waddr(m1_waddr), .wdata(out_data),
    .raddr(m1_raddr), .rdata(m1_rdata)
  );
  block_memory #(.DEPTH(32), .WIDTH(WORD_W)) u_mem2 (
    .clk, .we(m2_we), .waddr(m2_waddr), .wdata(out_data),
    .raddr(m2_raddr), .rdata(m2_rdata)
  );

  // ------------------------------------------------------------- transposer
  logic              tr_we;
  line_t [1:0]       tr_wdata, tr_rdata;
  logic [2:0]        pair_first;      // first row / column of the current pair

  assign pair_first = {cnt[2:1], 1'b0};

  ram_transposer #(.LANES(2)) u_transposer (
    .clk, .we(tr_we), .wrow(pair_first), .wdata(tr_wdata),
    .rcol(pair_first), .rdata(tr_rdata)
  );

  // ---------------------------------------------------------- filter units
  thresh_t    th;
  edge_line_t fu_in  [4];
  edge_line_t fu_out [4];

  threshold_derivation u_thresh (.qp, .bs, .th);

  for (genvar u = 0; u < 4; u++) begin : g_fu
    filter_unit u_fu (.line_in(fu_in[u]), .th, .chroma, .line_out(fu_out[u]));
  end

  // Lines presented to the units (splitters) and the rows / columns they
  // give back (combiners). Step 0 of a pair filters the block-border edge,
  // step 1 the edge through the middle of the block.
  line_t  src    [2];   // full row (H) or column (V) before this step
  line_t  res    [2];   // the same line after this step
  logic   border_on;    // the border edge has a neighbour to filter against
  logic   step;

  assign step = cnt[0];

  always_comb begin
    for (int u = 0; u < 4; u++) fu_in[u] = '0;
    for (int l = 0; l < 2; l++) begin
      logic [2:0] idx;
      edge_line_t e;
      idx = pair_first + 3'(l);
      if (phase == P_V) src[l] = step ? lane_reg[l] : tr_rdata[l];
      else if (step)    src[l] = lane_reg[l];
      else for (int c = 0; c < BLK; c++) src[l][c] = blk[idx][c];
      for (int i = 0; i < 4; i++) begin
        if (step) begin
          e.p[i] = src[l][3 - i];
          e.q[i] = src[l][4 + i];
        end else begin
          e.p[i] = (phase == P_V) ? ctxt[3 - i][idx] : ctxl[idx][3 - i];
          e.q[i] = src[l][i];
        end
      end
      // units 0/1 (Filter Units 1/2) work on rows, 2/3 (Filter Units 3/4) on columns
      fu_in[(phase == P_V) ? 2 + l : l] = e;
    end
  end

  always_comb begin
    border_on = (phase == P_V) ? (blk_row != '0) : (blk_col != '0);
    for (int l = 0; l < 2; l++) begin
      edge_line_t r;
      r = fu_out[(phase == P_V) ? 2 + l : l];
      res[l] = src[l];
      if (step) begin
        for (int i = 0; i < 4; i++) begin
          res[l][3 - i] = r.p[i];
          res[l][4 + i] = r.q[i];
        end
      end else if (border_on) begin
        for (int i = 0; i < 4; i++) res[l][i] = r.q[i];
      end
    end
    tr_wdata[0] = res[0];
    tr_wdata[1] = res[1];
  end

  assign tr_we = (phase == P_H) && step;

  // ------------------------------------------------------ queue interfaces
  logic [2:0] w_row;
  logic       w_half;
  assign w_row  = cnt[3:1];
  assign w_half = cnt[0];

  always_comb begin
    for (int k = 0; k < PIX_PER_WORD; k++)
      out_data[PIX_W*k +: PIX_W] = blk[w_row][{w_half, 2'(k)}];
  end

  assign in_rd  = (phase == P_LOAD) && !in_empty;
  assign out_wr = (phase == P_OUT) && !out_full;

  // Neighbour bookkeeping: right half of each row to memory 1 (address =
  // row), rows 4..7 to memory 2 (address = 8 * block column + word in rows 4..7).
  assign m1_we    = out_wr && w_half;
  assign m1_waddr = {2'b00, w_row};
  assign m2_we    = out_wr && w_row[2];
  assign m2_waddr = 5'({blk_col, w_row[1:0], w_half});
  assign m1_raddr = {2'b00, cnt[2:0]};
  assign m2_raddr = 5'({blk_col, cnt[2:0]});

  // ------------------------------------------------------- administration
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase    <= P_CTX;
      cnt      <= '0;
      blk_col  <= '0;
      blk_row  <= '0;
      blk_done <= 1'b0;
    end else begin
      blk_done <= 1'b0;
      unique case (phase)
        P_CTX: begin
          cnt <= (cnt == 5'd8) ? 5'd0 : cnt + 5'd1;
          if (cnt == 5'd8) phase <= P_LOAD;
        end
        P_LOAD: if (in_rd) begin
          cnt <= (cnt == 5'(WORDS_PER_BLK - 1)) ? 5'd0 : cnt + 5'd1;
          if (cnt == 5'(WORDS_PER_BLK - 1)) phase <= P_H;
        end
        P_H: begin
          cnt <= (cnt == 5'd7) ? 5'd0 : cnt + 5'd1;
          if (cnt == 5'd7) phase <= P_V;
        end
        P_V: begin
          cnt <= (cnt == 5'd7) ? 5'd0 : cnt + 5'd1;
          if (cnt == 5'd7) phase <= P_OUT;
        end
        P_OUT: if (out_wr) begin
          cnt <= (cnt == 5'(WORDS_PER_BLK - 1)) ? 5'd0 : cnt + 5'd1;
          if (cnt == 5'(WORDS_PER_BLK - 1)) begin
            phase    <= P_CTX;
            blk_done <= 1'b1;
            if (int'(blk_col) == FRAME_W_BLOCKS - 1) begin
              blk_col <= '0;
              blk_row <= (int'(blk_row) == FRAME_H_BLOCKS - 1) ? '0 : blk_row + 1'b1;
            end else begin
              blk_col <= blk_col + 1'b1;
            end
          end
        end
        default: phase <= P_CTX;
      endcase
    end
  end

  // Datapath registers: no reset needed, every one is written before it is read.
  always_ff @(posedge clk) begin
    unique case (phase)
      P_CTX: if (cnt != 5'd0) begin
        for (int k = 0; k < 4; k++) begin
          ctxl[cnt[2:0] - 3'd1][k] <= m1_rdata[PIX_W*k +: PIX_W];
          ctxt[2'((cnt - 5'd1) >> 1)][{cnt[0] ? 1'b0 : 1'b1, 2'(k)}] <= m2_rdata[PIX_W*k +: PIX_W];
        end
      end
      P_LOAD: if (in_rd) begin
        for (int k = 0; k < 4; k++)
          blk[w_row][{w_half, 2'(k)}] <= in_data[PIX_W*k +: PIX_W];
      end
      P_H, P_V: begin
        if (!step) begin
          lane_reg[0] <= res[0];
          lane_reg[1] <= res[1];
        end else if (phase == P_V) begin
          for (int l = 0; l < 2; l++)
            for (int r = 0; r < BLK; r++)
              blk[r][3'(int'(pair_first) + l)] <= res[l][r];
        end
      end
      default: ;
    endcase
  end

endmodule
