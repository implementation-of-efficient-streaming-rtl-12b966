// tb_ram_transposer: writes random 8x8 blocks two rows per clock and reads
// them back two columns at a time.
module tb_ram_transposer;
  import dbf_pkg::*;
  logic        clk = 0, we = 0;
  logic [2:0]  wrow = 0, rcol = 0;
  line_t [1:0] wdata, rdata;
  int          img [8][8];
  int checks = 0, failures = 0;

  ram_transposer #(.LANES(2)) dut (.clk, .we, .wrow, .wdata, .rcol, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wdata = '0;
    for (int blkn = 0; blkn < 20; blkn++) begin
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++) img[r][c] = $urandom_range(0, 255);
      for (int pr = 0; pr < 4; pr++) begin
        @(negedge clk);
        we = 1; wrow = 3'(2 * pr);
        for (int l = 0; l < 2; l++)
          for (int c = 0; c < 8; c++) wdata[l][c] = pixel_t'(img[2 * pr + l][c]);
      end
      @(negedge clk);
      we = 0;
      for (int pc = 0; pc < 4; pc++) begin
        rcol = 3'(2 * pc);
        #1;
        for (int l = 0; l < 2; l++)
          for (int r = 0; r < 8; r++) begin
            checks++;
            if (int'(rdata[l][r]) != img[r][2 * pc + l]) begin
              failures++;
              if (failures < 10) $display("blk %0d r=%0d c=%0d got %0d exp %0d",
                                          blkn, r, 2 * pc + l, rdata[l][r], img[r][2 * pc + l]);
            end
          end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
