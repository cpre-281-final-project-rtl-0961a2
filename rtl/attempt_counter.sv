// attempt_counter: counts wrong unlock attempts.
//
// A 3-bit up counter whose clock is the FSM's add_attempt output: every
// rising edge of inc_attempts (one per visit of the FSM to its "wrong code"
// state) adds one. Because the count changes as the FSM enters that state,
// hard_reset_indicator (count == MAX_ATTEMPTS) is already valid while the FSM
// looks at it in the same state. async_reset_attempts (active high) clears
// the count; in the lock it is hard_reset OR the FSM's att_reset (unlocked).
// Clocking the counter from the attempt pulse and the limit of five follow
// the original; saturating at the limit is this design's choice.
module attempt_counter #(
  parameter int unsigned MAX_ATTEMPTS = 5
) (
  input  logic       inc_attempts,
  input  logic       async_reset_attempts,
  output logic       hard_reset_indicator
);
  logic [2:0] count;

  always_ff @(posedge inc_attempts or posedge async_reset_attempts) begin
    if (async_reset_attempts)            count <= '0;
    else if (count != 3'(MAX_ATTEMPTS))  count <= count + 3'd1;
  end

  assign hard_reset_indicator = (count == 3'(MAX_ATTEMPTS));
endmodule
