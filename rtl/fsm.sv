// fsm: control state machine of the door lock.
//
// A Moore machine with seven live states (B..H, encoding from door_lock_pkg).
// Each state chooses, through {select1, select0}, which single condition the
// external 4-to-1 mux feeds back on select_in: a button press (B, E), the
// "four digits entered" transition (C, F), the code comparison (D) or the
// attempt limit (G). The only other input is the lock switch, used in E.
//
//   B --press--> C --transition--> D --match--> E --press--> F --transition--> E
//                                  D --no match--> G --limit--> H (stays)
//                                                  G --else--> B
//   E --lock--> B (lock has priority over a press)
//
// The machine is split as in the original: a state register here,
// fsm_next_state_logic for the transitions and fsm_output_logic for the
// outputs, which are decoded from the state register only, so they change one
// clock after the input that caused the transition. async_reset (active high)
// forces state B. Transitions, encoding and output decode follow the original
// state-assignment table; state A (000) is never entered and falls through to
// B. Writing the machine as an enum case statement instead of hand-reduced
// gate equations is this design's choice.
module fsm
  import door_lock_pkg::*;
(
  input  logic clk,
  input  logic async_reset,
  input  logic select_in,
  input  logic lock,
  output logic select1,
  output logic select0,
  output logic btn_ctr_reset,
  output logic add_attempt,
  output logic lock_light,
  output logic hard_lock_light,
  output logic new_code_light,
  output logic switch_regs,
  output logic att_reset
);

  state_t state, state_next;

  always_ff @(posedge clk or posedge async_reset) begin
    if (async_reset) state <= ST_B;
    else             state <= state_next;
  end

  fsm_next_state_logic u_next (.state, .select_in, .lock, .state_next);

  fsm_output_logic u_out (
    .state, .select1, .select0, .btn_ctr_reset, .add_attempt, .lock_light,
    .hard_lock_light, .new_code_light, .switch_regs, .att_reset
  );

  // State A only exists in the encoding; the machine never enters it.
  a_never_a: assert property (@(posedge clk) disable iff (async_reset) state_next != ST_A);

endmodule
