// tb_clock_enabler: checks that the registered enable follows the flags two
// rising edges later: AF up stops the actor, AF down restarts it.
module tb_clock_enabler;
  logic clk = 0, rst_n = 0, full = 0, almost_full = 0, en_q;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  clock_enabler dut (.clk, .rst_n, .full, .almost_full, .en_q);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_en(bit v, string what);
    checks++;
    if (en_q !== v) begin
      failures++;
      $display("%s: en_q=%0d expected %0d at %0t", what, en_q, v, $time);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    expect_en(1, "reset value");
    rst_n = 1;
    repeat (3) @(negedge clk);           // INIT -> SPACE
    expect_en(1, "space");
    for (int k = 0; k < 20; k++) begin
      int hold;
      hold = $urandom_range(3, 10);
      almost_full = 1;                   // SPACE -> AFULL_DISABLE
      @(negedge clk); expect_en(1, "one edge after AF");
      @(negedge clk); expect_en(0, "two edges after AF");
      if (k % 2 == 1) begin               // fill up: -> FULL -> AFULL_ENABLE
        full = 1;
        repeat (hold) begin @(negedge clk); expect_en(0, "full"); end
        full = 0;                         // F=0, AF=1 re-enables
        @(negedge clk); expect_en(0, "one edge after F fell");
        @(negedge clk); expect_en(1, "two edges after F fell");
        almost_full = 0;                  // -> SPACE
        repeat (3) begin @(negedge clk); expect_en(1, "space again"); end
      end else begin
        repeat (hold) begin @(negedge clk); expect_en(0, "almost full"); end
        almost_full = 0;                  // -> SPACE
        @(negedge clk); expect_en(0, "one edge after AF fell");
        @(negedge clk); expect_en(1, "two edges after AF fell");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
