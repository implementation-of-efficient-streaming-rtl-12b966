// tb_queue: random writes and reads against a queue model, checking data
// order and the empty, FULL and ALMOST-FULL flags after every clock. The
// read clock is a copy of the write clock that the testbench stops now and
// then, as the clock buffer does for a gated actor.
module tb_queue;
  localparam int W = 32, D = 16, AF = 12;
  logic         clk = 0, rst_n = 0, rgate = 1, rgate_lat = 1;
  logic         rclk;
  logic         wr_en = 0, rd_en = 0;
  logic [W-1:0] din = 0, dout;
  logic         empty, full, almost_full;
  logic [W-1:0] model [$];
  int checks = 0, failures = 0, n_full = 0, n_af = 0, n_empty = 0;

  always #5 clk = ~clk;
  always_latch if (!clk) rgate_lat = rgate;
  assign rclk = clk & rgate_lat;

  queue #(.WIDTH(W), .DEPTH(D), .AF_LEVEL(AF)) dut (
    .wclk(clk), .rclk, .rst_n, .wr_en, .din, .rd_en, .dout, .empty, .full, .almost_full);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_flags();
    checks += 4;
    if (empty != (model.size() == 0)) failures++;
    if (full != (model.size() == D)) failures++;
    if (almost_full != (model.size() >= AF)) begin
      failures++;
      $display("AF wrong at size %0d", model.size());
    end
    if (model.size() > 0 && dout != model[0]) begin
      failures++;
      $display("dout %h expected %h", dout, model[0]);
    end
    if (full) n_full++;
    if (almost_full) n_af++;
    if (empty) n_empty++;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      int wp, rp;
      @(negedge clk);
      check_flags();
      // alternate between filling and draining phases
      wp = ((n / 200) % 2 == 0) ? 80 : 30;
      rp = 100 - wp;
      wr_en = !full && ($urandom_range(0, 99) < wp);
      din   = $urandom;
      rgate = ($urandom_range(0, 9) != 0);
      rd_en = !empty && ($urandom_range(0, 99) < rp);
      @(posedge clk);
      if (rd_en && rgate) void'(model.pop_front());
      if (wr_en) model.push_back(din);
    end
    checks++;
    if (n_full == 0 || n_af == 0 || n_empty == 0) begin
      failures++;
      $display("flags not all seen: full=%0d af=%0d empty=%0d", n_full, n_af, n_empty);
    end
    $display("cycles full=%0d almost_full=%0d empty=%0d", n_full, n_af, n_empty);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
