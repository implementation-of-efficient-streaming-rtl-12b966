// det_ff: double-edge-triggered register (DET flip-flop), WIDTH bits wide.
//
// A single-edge register takes one new value per clock period; this one
// takes two, one on each edge, so it carries the same data rate at half the
// clock frequency. Inside are a register on the rising edge, a register on
// the falling edge and a multiplexer selected by the clock: while clk is
// high the output shows what the rising-edge register took, while clk is low
// what the falling-edge register took. q thus always equals d as sampled at
// the most recent clock edge of either polarity.
//
// The two registers and the clock-selected multiplexer follow the DET
// flip-flop structure. Which multiplexer input is chosen for which clock
// level is set here so that q shows the latest sample; the asynchronous
// active-low reset is this design's choice.
module det_ff #(
  parameter int WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  logic [WIDTH-1:0] q_rise, q_fall;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q_rise <= '0;
    else        q_rise <= d;
  end

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) q_fall <= '0;
    else        q_fall <= d;
  end

  assign q = clk ? q_rise : q_fall;

endmodule
