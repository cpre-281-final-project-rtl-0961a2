// fsm_output_logic: Moore output decode of the door-lock FSM.
//
// Combinational, from the state alone:
//   select1/select0  condition the 4-to-1 mux returns: 00 press (B, E),
//                    01 four digits (C, F), 10 match (D), 11 limit (G, H)
//   btn_ctr_reset    A, B, E    hold the digit counter at zero
//   add_attempt      G          count a wrong code
//   lock_light       E, F       lock open
//   new_code_light   F
//   hard_lock_light  H
//   switch_regs      0 in E, F (writes go to the stored code), else 1
//   att_reset        A, E       clear the attempt counter
// Values follow the original's output equations, which also fix its
// don't-care entries (state A, select lines in H, switch_regs in D, G, H).
module fsm_output_logic
  import door_lock_pkg::*;
(
  input  state_t state,
  output logic   select1,
  output logic   select0,
  output logic   btn_ctr_reset,
  output logic   add_attempt,
  output logic   lock_light,
  output logic   hard_lock_light,
  output logic   new_code_light,
  output logic   switch_regs,
  output logic   att_reset
);
  logic [1:0] sel;

  always_comb begin
    sel             = SEL_PRESS;
    btn_ctr_reset   = 1'b0;
    add_attempt     = 1'b0;
    lock_light      = 1'b0;
    hard_lock_light = 1'b0;
    new_code_light  = 1'b0;
    switch_regs     = 1'b1;
    att_reset       = 1'b0;
    unique case (state)
      ST_A: begin btn_ctr_reset = 1'b1; att_reset = 1'b1; end
      ST_B: btn_ctr_reset = 1'b1;
      ST_C: sel = SEL_TRANSITION;
      ST_D: sel = SEL_MATCH;
      ST_E: begin btn_ctr_reset = 1'b1; lock_light = 1'b1; switch_regs = 1'b0; att_reset = 1'b1; end
      ST_F: begin sel = SEL_TRANSITION; lock_light = 1'b1; new_code_light = 1'b1; switch_regs = 1'b0; end
      ST_G: begin sel = SEL_ATTEMPTS; add_attempt = 1'b1; end
      ST_H: begin sel = SEL_ATTEMPTS; hard_lock_light = 1'b1; end
      default: ;
    endcase
  end

  assign {select1, select0} = sel;
endmodule
