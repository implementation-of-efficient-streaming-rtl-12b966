// clock_buffer: clock buffer with enable, used as the clock gate of an
// actor (the role of a BUFGCE global buffer on an FPGA).
//
// While ce is 1 the output clock follows clk; while ce is 0 it stays low.
// ce is captured by a latch that is transparent only while clk is low, so a
// change of ce can only take effect at the next rising edge and the gated
// clock never carries a shortened pulse. Timing: ce must be stable around
// the rising edge of clk; a ce that falls after rising edge n suppresses
// edge n+1.
//
// The enable-controlled buffer comes from the clock-gating scheme; the
// latch-and-AND structure is this design's choice (the usual integrated
// clock-gating cell). The latch is intended: it is what keeps the gated
// clock free of glitches.
module clock_buffer (
  input  logic clk,
  input  logic ce,
  output logic gclk
);
  logic ce_lat;

  always_latch begin
    if (!clk) ce_lat = ce;
  end

  assign gclk = clk & ce_lat;

endmodule
