// ce_controller: the state machine of the clock enabler.
//
// It watches the FULL (F) and ALMOST-FULL (AF) flags of the queue that an
// actor writes into and decides whether that actor may be clocked (en=1).
// Five states, each with a fixed en (Moore outputs):
//   INIT (en), SPACE (en), AFULL_DISABLE (en=0), FULL (en=0), AFULL_ENABLE (en).
// Transitions, tested on each rising clk edge:
//   INIT          -> SPACE          when AF=0
//   SPACE         -> AFULL_DISABLE  when F=0, AF=1
//   AFULL_DISABLE -> SPACE          when F=0, AF=0
//   AFULL_DISABLE -> FULL           when F=1, AF=1
//   FULL          -> AFULL_ENABLE   when F=0, AF=1
//   AFULL_ENABLE  -> FULL           when F=1, AF=1
//   AFULL_ENABLE  -> SPACE          when F=0, AF=0
// Any other input combination keeps the state. So the actor stops as soon
// as its output queue is almost full and restarts when the queue drains
// below the AF level, or, if the queue did fill up, as soon as one word has
// left it.
//
// The states, their en values and the transitions are those of the clock
// enabler's state diagram. That diagram labels INIT -> SPACE with F=1, AF=0,
// a combination that a queue cannot produce (full implies almost full); here
// F is ignored on that edge. The asynchronous active-low reset to INIT is
// this design's choice.
module ce_controller (
  input  logic clk,
  input  logic rst_n,
  input  logic full,         // F
  input  logic almost_full,  // AF
  output logic en
);
  typedef enum logic [2:0] {
    S_INIT, S_SPACE, S_AFULL_DISABLE, S_FULL, S_AFULL_ENABLE
  } state_t;

  state_t state, state_next;

  always_comb begin
    state_next = state;
    unique case (state)
      S_INIT:
        if (!almost_full) state_next = S_SPACE;
      S_SPACE:
        if (!full && almost_full) state_next = S_AFULL_DISABLE;
      S_AFULL_DISABLE:
        if (!full && !almost_full)     state_next = S_SPACE;
        else if (full && almost_full)  state_next = S_FULL;
      S_FULL:
        if (!full && almost_full) state_next = S_AFULL_ENABLE;
      S_AFULL_ENABLE:
        if (full && almost_full)        state_next = S_FULL;
        else if (!full && !almost_full) state_next = S_SPACE;
      default: state_next = S_INIT;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= S_INIT;
    else        state <= state_next;
  end

  always_comb begin
    unique case (state)
      S_AFULL_DISABLE, S_FULL: en = 1'b0;
      default:                 en = 1'b1;
    endcase
  end

endmodule
