// fsm_next_state_logic: transition function of the door-lock FSM.
//
// Combinational. From the current state, the condition selected for that
// state (select_in) and the lock switch it gives the next state:
//   B, C: advance on select_in (press, then four digits)
//   D: select_in (codes match) -> E, else -> G
//   E: lock -> B, else select_in (press) -> F, else stay
//   F: select_in (four digits) -> E
//   G: select_in (attempt limit) -> H, else -> B
//   H: stays; the unused code A goes to B
// The table is the original's state-assignment table; writing it as a case
// statement rather than reduced sum-of-products gates is this design's
// choice.
module fsm_next_state_logic
  import door_lock_pkg::*;
(
  input  state_t state,
  input  logic   select_in,
  input  logic   lock,
  output state_t state_next
);
  always_comb begin
    unique case (state)
      ST_A: state_next = ST_B;
      ST_B: state_next = select_in ? ST_C : ST_B;
      ST_C: state_next = select_in ? ST_D : ST_C;
      ST_D: state_next = select_in ? ST_E : ST_G;
      ST_E: state_next = lock ? ST_B : (select_in ? ST_F : ST_E);
      ST_F: state_next = select_in ? ST_E : ST_F;
      ST_G: state_next = select_in ? ST_H : ST_B;
      ST_H: state_next = ST_H;
      default: state_next = ST_B;
    endcase
  end
endmodule
