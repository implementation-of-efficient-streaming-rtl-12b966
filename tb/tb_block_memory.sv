// tb_block_memory: fills the 32 x 32 memory with random words, then reads
// them back in random order, checking the one-cycle read latency and that
// a read of the address being written returns the old word.
module tb_block_memory;
  logic        clk = 0, we = 0;
  logic [4:0]  waddr = 0, raddr = 0;
  logic [31:0] wdata = 0, rdata;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  block_memory dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int a = 0; a < 32; a++) begin
      we = 1; waddr = 5'(a); wdata = $urandom; model[a] = wdata;
      @(negedge clk);
    end
    we = 0;
    for (int n = 0; n < 200; n++) begin
      int a;
      logic [31:0] old;
      a = $urandom_range(0, 31);
      raddr = 5'(a);
      old = model[a];
      // write the same address in the same cycle half of the time
      we = n[0]; waddr = 5'(a); wdata = $urandom;
      if (we) model[a] = wdata;
      @(posedge clk); #1;
      checks++;
      if (rdata !== old) begin
        failures++;
        $display("read %0d got %h exp %h", a, rdata, old);
      end
      @(negedge clk);
      we = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
