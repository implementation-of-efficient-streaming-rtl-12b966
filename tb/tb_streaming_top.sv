// tb_streaming_top: end-to-end run of the clock-gated streaming stage with
// the ALMOST-FULL level of the queues raised to 15 of 16, so that the
// output queue really fills up and the clock enabler passes through its
// FULL and AFULL_ENABLE states. Four 4x4-block pictures (luma and chroma,
// several QP and bS) go through under four producer/consumer rate patterns;
// every output pixel is compared with the dbf_ref_pkg picture model, the
// block period at full rate is checked (57 cycles), and each mechanism of
// the design is counted and must occur: clock gating, restart, the FULL
// path of the enabler, input-empty waits, input back-pressure, luma and
// chroma filtering and the DET register.
module tb_streaming_top;
  import dbf_pkg::*;
  import dbf_ref_pkg::*;

  localparam int WB = 4, HB = 4;
  localparam int NBLK = WB * HB;
  localparam int NWORDS = NBLK * WORDS_PER_BLK;

  logic              clk = 0, rst_n = 0;
  logic [5:0]        qp = 0;
  logic [1:0]        bs = 0;
  logic              chroma = 0;
  logic              in_wr = 0, in_full, in_almost_full;
  logic [WORD_W-1:0] in_data = 0, out_data;
  logic              out_rd = 0, out_empty;
  logic              actor_en, actor_clk, blk_done;
  logic [7:0]        det_d = 0, det_q, det_latch_q;

  always #5 clk = ~clk;

  streaming_top #(.Q_AF_LEVEL(15)) dut (
    .clk, .rst_n, .qp, .bs, .chroma,
    .in_wr, .in_data, .in_full, .in_almost_full,
    .out_rd, .out_data, .out_empty,
    .actor_en, .actor_clk, .blk_done, .det_d, .det_q, .det_latch_q
  );

  logic [WORD_W-1:0] in_words [NWORDS];
  int  in_idx = 0, in_total = 0, out_idx = 0;
  int  prod_rate = 100, cons_rate = 100;      // percent of cycles that try
  int  got [][];
  int  checks = 0, failures = 0;
  // mechanism counters
  int  n_gate_off = 0, n_gated_cycles = 0, n_q_full = 0, n_full_state = 0;
  int  n_in_empty_wait = 0, n_in_backpressure = 0, n_chroma_blocks = 0, n_luma_blocks = 0;
  int  n_det_edges = 0, n_starved_gated = 0, n_cycles = 0;
  longint last_done = 0;
  int  n_done = 0, period_bad = 0;
  bit  prev_en = 1, fast_phase = 0;

  // producer and consumer, free-running clock
  always @(negedge clk) begin
    in_wr   = (in_idx < in_total) && !in_full && ($urandom_range(1, 100) <= prod_rate);
    in_data = in_words[in_idx < in_total ? in_idx : 0];
    out_rd  = !out_empty && ($urandom_range(1, 100) <= cons_rate);
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (in_wr) in_idx <= in_idx + 1;
      if (in_full && in_idx < in_total) n_in_backpressure++;
      if (out_rd) begin
        int b, w, row, col0;
        b = out_idx / WORDS_PER_BLK;
        w = out_idx % WORDS_PER_BLK;
        row = (b / WB) * 8 + w / 2;
        col0 = (b % WB) * 8 + (w % 2) * 4;
        for (int k = 0; k < 4; k++) got[row][col0 + k] = int'(out_data[8 * k +: 8]);
        out_idx <= out_idx + 1;
      end
      if (prev_en && !actor_en) n_gate_off++;
      prev_en <= actor_en;
      if (!actor_en) n_gated_cycles++;
      if (!actor_en && out_empty) n_starved_gated++;
      n_cycles++;
      if (dut.q2_full) n_q_full++;
      if (dut.u_enabler.u_ctrl.state == 3'd3) n_full_state++;
      if (dut.u_actor.phase == 3'd1 && dut.a_in_empty && actor_en) n_in_empty_wait++;
    end
  end

  // the actor's block period, on its own gated clock
  always @(posedge actor_clk) begin
    if (rst_n && blk_done) begin
      n_done++;
      if (chroma) n_chroma_blocks++; else n_luma_blocks++;
      if (fast_phase && n_done > 1 && (longint'($time) - last_done) / 10 != 57) period_bad++;
      last_done = longint'($time);
    end
  end

  // DET register: a new value every half period, checked after each edge
  initial begin
    logic [7:0] sent;
    sent = 0;
    forever begin
      @(clk);
      #1;
      if (rst_n) begin
        checks++;
        n_det_edges++;
        checks++;
        if (det_q !== sent) failures++;
        if (det_latch_q !== sent) failures++;
      end
      #1;
      det_d = 8'($urandom);
      sent = det_d;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired: in %0d/%0d out %0d", in_idx, in_total, out_idx);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_picture(int pqp, int pbs, bit pchroma, int prate, int crate, int seed);
    int pic [][];
    int ref_pic [][];
    int diffs, moved;
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
    // the actor is idle between pictures, waiting for input, so the
    // settings may change here
    qp = 6'(pqp); bs = 2'(pbs); chroma = pchroma;
    prod_rate = prate; cons_rate = crate;
    in_idx = 0; out_idx = 0; in_total = NWORDS;
    wait (out_idx == NWORDS);
    repeat (4) @(negedge clk);
    in_total = 0;
    diffs = 0; moved = 0;
    for (int y = 0; y < HB * 8; y++)
      for (int x = 0; x < WB * 8; x++) begin
        checks++;
        if (got[y][x] != ref_pic[y][x]) begin
          failures++;
          if (diffs++ < 8) $display("pixel (%0d,%0d): got %0d expected %0d", y, x, got[y][x], ref_pic[y][x]);
        end
        if (ref_pic[y][x] != pic[y][x]) moved++;
      end
    checks++;
    if (moved == 0) failures++;
    $display("picture qp=%0d bs=%0d chroma=%0d: %0d pixels filtered, output matches: %0d",
             pqp, pbs, pchroma, moved, diffs == 0);
  endtask

  task automatic mechanism(string name, int count);
    checks++;
    $display("  %-38s %0d", name, count);
    if (count == 0) begin
      failures++;
      $display("  ... never happened");
    end
  endtask

  initial begin
    int gated_before;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // 1: producer and consumer at full rate: no gating, 57 cycles per block
    fast_phase = 1;
    run_picture(36, 2, 0, 100, 100, 1);
    fast_phase = 0;
    checks += 2;
    if (period_bad != 0) begin
      failures++;
      $display("%0d block periods not 57 cycles at full rate", period_bad);
    end
    if (n_gated_cycles != 0) begin
      failures++;
      $display("clock gated although the consumer kept up");
    end
    // 2: slow consumer: the output queue fills and the actor's clock stops
    gated_before = n_gated_cycles;
    run_picture(45, 3, 1, 100, 15, 2);
    // 3: slow producer, bursty consumer
    run_picture(28, 1, 0, 10, 40, 3);
    // 4: both bursty
    run_picture(40, 2, 0, 50, 25, 4);
    $display("mechanisms:");
    mechanism("clock gated off (EN falls)", n_gate_off);
    mechanism("cycles with the actor's clock stopped", n_gated_cycles);
    mechanism("actor waits on an empty input queue", n_in_empty_wait);
    mechanism("producer held off by a full input queue", n_in_backpressure);
    mechanism("luma blocks", n_luma_blocks);
    mechanism("chroma blocks", n_chroma_blocks);
    mechanism("DET register edges checked", n_det_edges);
    mechanism("output queue FULL", n_q_full);
    mechanism("enabler in FULL state", n_full_state);
    // gating must never starve the consumer: while the actor's clock is
    // stopped the output queue still holds data
    checks++;
    $display("  %-38s %0d", "consumer starved while clock stopped", n_starved_gated);
    if (n_starved_gated != 0) failures++;
    $display("clock of the actor stopped in %0d of %0d cycles", n_gated_cycles, n_cycles);
    checks++;
    if (n_done != 4 * NBLK) begin
      failures++;
      $display("%0d blocks finished, expected %0d", n_done, 4 * NBLK);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
