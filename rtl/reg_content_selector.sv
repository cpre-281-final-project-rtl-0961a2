// reg_content_selector: chooses which four-digit code goes to the displays.
//
// A 2-to-1 multiplexer over a whole code: out_data = s ? set_data1 :
// set_data0, digit by digit. Purely combinational. In the lock, s is the
// FSM's switch_regs, so the register currently being written is the one
// shown.
module reg_content_selector
  import door_lock_pkg::*;
(
  input  code_t set_data0,
  input  code_t set_data1,
  input  logic  s,
  output code_t out_data
);
  for (genvar i = 0; i < DIGITS; i++) begin : g_digit
    assign out_data[i] = s ? set_data1[i] : set_data0[i];
  end
endmodule
