// tb_deblocking_filter: whole pictures through the actor, with the queues
// modelled in the testbench. Picture 1 (luma) runs without stalls and checks
// the 57-cycle block period; picture 2 (chroma) and picture 3 (luma) run
// with random empty-input and full-output stalls. Every output pixel is
// compared with the dbf_ref_pkg picture model.
module tb_deblocking_filter;
  import dbf_pkg::*;
  import dbf_ref_pkg::*;

  localparam int WB = 4, HB = 4;
  localparam int NBLK = WB * HB;

  logic              clk = 0, rst_n = 0;
  logic [5:0]        qp = 0;
  logic [1:0]        bs = 0;
  logic              chroma = 0;
  logic [WORD_W-1:0] in_data, out_data;
  logic              in_empty, in_rd, out_full, out_wr, blk_done;

  logic [WORD_W-1:0] in_words [NBLK * WORDS_PER_BLK];
  int in_idx, out_idx, in_total;
  bit stall_in, stall_out;
  int got [][];
  int checks = 0, failures = 0, n_in_stall = 0, n_out_stall = 0;
  longint last_done;
  int n_done, period_bad;

  always #5 clk = ~clk;

  deblocking_filter #(.FRAME_W_BLOCKS(WB), .FRAME_H_BLOCKS(HB)) dut (
    .clk, .rst_n, .qp, .bs, .chroma, .in_data, .in_empty, .in_rd,
    .out_data, .out_full, .out_wr, .blk_done);

  assign in_empty = (in_idx >= in_total) || stall_in;
  assign in_data  = in_words[in_idx < in_total ? in_idx : 0];
  assign out_full = stall_out;

  always @(posedge clk) begin
    if (in_rd) in_idx <= in_idx + 1;
    if (out_wr) begin
      int b, w, row, col0;
      b = out_idx / WORDS_PER_BLK;
      w = out_idx % WORDS_PER_BLK;
      row = (b / WB) * 8 + w / 2;
      col0 = (b % WB) * 8 + (w % 2) * 4;
      for (int k = 0; k < 4; k++) got[row][col0 + k] = int'(out_data[8 * k +: 8]);
      out_idx <= out_idx + 1;
    end
    // the actor has work queued but the input is withheld / the output is blocked
    if (stall_in && in_idx < in_total) n_in_stall++;
    if (stall_out && out_idx > 0 && out_idx < in_idx) n_out_stall++;
    if (blk_done) begin
      n_done++;
      if (n_done > 1 && !stall_on && (longint'($time) - last_done) / 10 != 57) period_bad++;
      last_done = longint'($time);
    end
  end

  bit stall_on = 0;
  always @(negedge clk) begin
    stall_in  = stall_on && ($urandom_range(0, 3) == 0);
    stall_out = stall_on && ($urandom_range(0, 2) == 0);
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_picture(int pqp, int pbs, bit pchroma, bit stalls, int seed);
    int pic [][];
    int ref_pic [][];
    make_picture(pic, WB, HB, seed);
    ref_pic = new[HB * 8];
    got = new[HB * 8];
    for (int y = 0; y < HB * 8; y++) begin
      ref_pic[y] = new[WB * 8](pic[y]);
      got[y] = new[WB * 8];
    end
    deblock_frame(ref_pic, WB, HB, pqp, pbs, pchroma);
    for (int b = 0; b < NBLK; b++)
      for (int w = 0; w < WORDS_PER_BLK; w++)
        for (int k = 0; k < 4; k++)
          in_words[b * WORDS_PER_BLK + w][8 * k +: 8] =
            8'(pic[(b / WB) * 8 + w / 2][(b % WB) * 8 + (w % 2) * 4 + k]);
    @(negedge clk);
    qp = 6'(pqp); bs = 2'(pbs); chroma = pchroma; stall_on = stalls;
    in_idx = 0; out_idx = 0; in_total = NBLK * WORDS_PER_BLK;
    wait (out_idx == NBLK * WORDS_PER_BLK);
    @(negedge clk);
    in_total = 0;
    begin
      int diffs = 0, moved = 0;
      for (int y = 0; y < HB * 8; y++)
        for (int x = 0; x < WB * 8; x++) begin
          checks++;
          if (got[y][x] != ref_pic[y][x]) begin
            failures++;
            if (diffs++ < 8) $display("pixel (%0d,%0d): got %0d expected %0d", y, x, got[y][x], ref_pic[y][x]);
          end
          if (ref_pic[y][x] != pic[y][x]) moved++;
        end
      $display("picture qp=%0d bs=%0d chroma=%0d: %0d pixels changed by filtering", pqp, pbs, pchroma, moved);
      checks++;
      if (moved == 0) failures++;
    end
  endtask

  initial begin
    in_idx = 0; in_total = 0; out_idx = 0;
    n_done = 0; period_bad = 0; last_done = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_picture(36, 2, 0, 0, 1);
    repeat (2) @(negedge clk);
    checks++;
    if (n_done != NBLK || period_bad != 0) begin
      failures++;
      $display("block period: %0d blocks, %0d periods not 57 cycles", n_done, period_bad);
    end
    run_picture(45, 3, 1, 1, 2);
    run_picture(30, 1, 0, 1, 3);
    checks++;
    if (n_in_stall == 0 || n_out_stall == 0) failures++;
    $display("stall cycles: input empty %0d, output full %0d", n_in_stall, n_out_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
