// det_latch_ff: double-edge-triggered register built from two level-
// sensitive latches, WIDTH bits wide; the latch-level form of det_ff.
//
// A positive latch passes d while clk = 1 and holds it while clk = 0
// (Q = D.CLK + Q.CLK'); a negative latch does the opposite
// (Q = D.CLK' + Q.CLK). The two latches work side by side on the same d, not
// one after the other as in a master-slave register. An output multiplexer,
// selected by clk, always shows the latch that is currently holding: while
// clk is high the negative latch, which closed on the rising edge, and while
// clk is low the positive latch, which closed on the falling edge. The
// output is therefore never transparent to d and changes only at clock
// edges, to the value d had at that edge: two samples per clock period.
//
// Interface: d must be stable around both clock edges; q follows at each
// edge. There is no reset: like the latch form it models, the register
// holds whatever it last sampled, so it is valid from the first clock edge.
//
// The latch pair, their equations and the clock-selected output multiplexer
// follow the DET flip-flop's logic structure. The latches are intended: they
// are the storage elements of this form of the register.
module det_latch_ff #(
  parameter int WIDTH = 8
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  logic [WIDTH-1:0] q_pos, q_neg;

  always_latch begin
    if (clk) q_pos = d;          // positive level-sensitive latch
  end

  always_latch begin
    if (!clk) q_neg = d;         // negative level-sensitive latch
  end

  assign q = clk ? q_neg : q_pos;

endmodule
