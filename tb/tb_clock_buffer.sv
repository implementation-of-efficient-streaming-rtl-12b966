// tb_clock_buffer: counts gated-clock pulses against enable patterns and
// checks that every pulse is a full clock-high phase, even when the enable
// changes while the clock is high.
module tb_clock_buffer;
  logic clk = 0, ce = 1, gclk;
  int checks = 0, failures = 0, pulses = 0, expected = 0;
  realtime rise_t;
  bit started = 0;

  always #5 clk = ~clk;

  clock_buffer dut (.clk, .ce, .gclk);

  always @(posedge gclk) if (started) begin
    pulses++;
    rise_t = $realtime;
    checks++;
    if (clk !== 1'b1) failures++;
  end
  always @(negedge gclk) if (started && pulses > 0) begin
    checks++;
    if ($realtime - rise_t != 5.0) begin
      failures++;
      $display("short gated pulse at %0t", $time);
    end
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    started = 1;
    for (int n = 0; n < 2000; n++) begin
      // set the enable in the low phase; it decides the next rising edge
      ce = ($urandom_range(0, 2) != 0);
      if (ce) expected++;
      @(posedge clk);
      #2;
      ce = $urandom_range(0, 1);       // a change while high must not cut the pulse
      @(negedge clk);
    end
    checks++;
    if (pulses != expected) begin
      failures++;
      $display("pulses %0d expected %0d", pulses, expected);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
