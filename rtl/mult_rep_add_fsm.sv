// Control path of the repetitive-addition multiplier.
//
// A three-state Moore machine. In IDLE it waits for the active-low start
// input; in RUN it asserts calc so the datapath adds and counts down, and it
// stays there until the datapath raises done; FINISH lasts exactly one cycle
// and then the machine returns to IDLE. The outputs depend on the state only:
//
//   state   calc  complete
//   IDLE     0      1
//   RUN      1      0
//   FINISH   0      1
//
// Interface: i_clk, active-low asynchronous reset i_rstb (forces IDLE),
// active-low start i_startb sampled in IDLE, i_done from the datapath.
// Timing: i_startb low at a rising edge in IDLE enters RUN at that edge;
// i_done high at a rising edge in RUN enters FINISH at that edge.
//
// States, transitions, outputs and the asynchronous reset all follow the
// original design; the state encoding (see the package) is this design's own.
module mult_rep_add_fsm
  import mult_rep_add_pkg::*;
(
  input  logic i_clk,
  input  logic i_rstb,
  input  logic i_startb,
  input  logic i_done,
  output logic o_calc,
  output logic o_complete
);

  state_t state, state_next;

  // Next-state logic
  always_comb begin
    state_next = state;
    unique case (state)
      ST_IDLE:   if (!i_startb) state_next = ST_RUN;
      ST_RUN:    if (i_done)    state_next = ST_FINISH;
      ST_FINISH:                state_next = ST_IDLE;
      default:                  state_next = ST_IDLE;
    endcase
  end

  // State register, asynchronous active-low reset
  always_ff @(posedge i_clk or negedge i_rstb) begin
    if (!i_rstb) state <= ST_IDLE;
    else         state <= state_next;
  end

  // Moore outputs: calc only in RUN, complete everywhere else
  assign o_calc     = (state == ST_RUN);
  assign o_complete = !o_calc;

endmodule
