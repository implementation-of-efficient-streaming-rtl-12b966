// clock_enabler: controller plus enable register.
//
// The ce_controller state machine turns the F and AF flags of the actor's
// output queue into an enable; a D flip-flop on the free-running clock
// registers that enable before it reaches the clock buffer, so the buffer
// sees a clean, edge-aligned signal. en_q therefore follows a change of the
// flags two rising edges later (one for the state register, one for the D
// flip-flop).
//
// The controller-plus-flip-flop structure follows the clock enabler of the
// clock-gating scheme. The flip-flop's reset value of 1 (the actor runs from
// reset, as INIT enables it) is this design's choice.
module clock_enabler (
  input  logic clk,          // free-running clock
  input  logic rst_n,
  input  logic full,         // F of the output queue
  input  logic almost_full,  // AF of the output queue
  output logic en_q          // to the clock buffer
);
  logic en;

  ce_controller u_ctrl (
    .clk, .rst_n, .full, .almost_full, .en
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) en_q <= 1'b1;
    else        en_q <= en;
  end

endmodule
