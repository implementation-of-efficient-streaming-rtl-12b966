// tb_det_latch_ff: feeds a new value every half clock period and checks that q
// shows the value taken at each rising and each falling edge, so two words
// pass per clock period, and that q never follows d between edges.
module tb_det_latch_ff;
  localparam int W = 8;
  logic         clk = 0;
  logic [W-1:0] d = 0, q;
  int checks = 0, failures = 0, rise_n = 0, fall_n = 0;

  det_latch_ff #(.WIDTH(W)) dut (.clk, .d, .q);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] sample;
    #3;
    for (int n = 0; n < 1000; n++) begin
      d = W'($urandom);
      #2;
      sample = d;
      clk = ~clk;                      // edge: rising on even n, falling on odd n
      #1;
      d = W'($urandom);                // input moves right after the edge
      #1;
      checks++;
      if (q !== sample) begin
        failures++;
        if (failures < 10) $display("edge %0d (%s): q=%h expected %h", n, clk ? "rise" : "fall", q, sample);
      end
      if (clk) rise_n++; else fall_n++;
    end
    checks++;
    if (rise_n != fall_n) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
