// tb_ce_controller: drives the F and AF flags with random but queue-like
// sequences and with every combination, and compares the enable with a
// transition table of the five-state clock-enabler diagram.
module tb_ce_controller;
  logic clk = 0, rst_n = 0, full = 0, almost_full = 0, en;
  int checks = 0, failures = 0;
  int visits [5];

  always #5 clk = ~clk;

  ce_controller dut (.clk, .rst_n, .full, .almost_full, .en);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // 0 INIT, 1 SPACE, 2 AFULL_DISABLE, 3 FULL, 4 AFULL_ENABLE; index [state][{F,AF}]
  int next_tab [5][4] = '{
    '{1, 0, 1, 0},    // INIT: leaves when AF = 0
    '{1, 2, 1, 1},    // SPACE
    '{1, 2, 2, 3},    // AFULL_DISABLE
    '{3, 4, 3, 3},    // FULL
    '{1, 4, 4, 3}     // AFULL_ENABLE
  };
  bit en_tab [5] = '{1, 1, 0, 0, 1};

  initial begin
    int st, level;
    almost_full = 1;               // INIT must wait while AF is up
    repeat (2) @(negedge clk);
    rst_n = 1;
    st = 0;
    level = 14;
    for (int n = 0; n < 6000; n++) begin
      logic f, af;
      @(negedge clk);
      checks++;
      if (en != en_tab[st]) begin
        failures++;
        if (failures < 10) $display("n=%0d state %0d: en=%0d", n, st, en);
      end
      visits[st]++;
      if (n < 3000) begin
        // queue-like: a level that moves by at most one per cycle
        level = level + int'($urandom_range(0, 2)) - 1;
        if (level < 0) level = 0;
        if (level > 16) level = 16;
        f = (level == 16); af = (level >= 12);
      end else begin
        {f, af} = 2'($urandom_range(0, 3));
      end
      full = f; almost_full = af;
      @(posedge clk);
      st = next_tab[st][{f, af}];
    end
    for (int s = 0; s < 5; s++) begin
      checks++;
      if (visits[s] == 0) begin
        failures++;
        $display("state %0d never visited", s);
      end
    end
    $display("state visits: %0d %0d %0d %0d %0d", visits[0], visits[1], visits[2], visits[3], visits[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
