// simple_door_lock: four-digit combination lock for a push-button board.
//
// The user types four digits (1..4) on four buttons. A Moore FSM (fsm)
// steers the flow: while idle it waits for a press; code_entering_module
// writes each digit into the "entered code" register file and tells the FSM
// when four are in; subtractor_unit compares that register with the "stored
// code" register file. A match opens the lock (lock_light) and lets the user
// type a new code straight into the stored register (new_code_light) any
// number of times until the lock switch is closed. A mismatch bumps
// attempt_counter; the fifth wrong code puts the FSM in a state that only
// hard_reset leaves (hard_lock_light). hard_reset also sets the stored code
// to 1111 and clears the attempt count.
//
// The FSM looks at one condition at a time: its two select outputs drive
// mux_4_to_1, which returns either the press pulse, the four-digits signal,
// the code match or the attempt limit on select_in.
//
// Clocking: everything runs on Board_Clk divided by 2**DIV_BITS (1024), except
// attempt_counter, which is clocked by the FSM's add_attempt pulse, and the
// lock-switch debouncer, which samples on Board_Clk divided by 2**(2*DIV_BITS).
// The clear switch is synchronised by one flip-flop and ORed with the FSM's
// btn_ctr_reset to clear the digit counter. Three seven-segment displays
// (hex[0] = first digit) show the digits typed so far; the fourth digit
// blanks them. Segments are active low, {g,f,e,d,c,b,a}.
//
// Buttons are active low (button_n[k] = 0 types digit k+1); hard_reset,
// lck and clr_entered_code are active high. The overall structure follows
// the original; the choices of this design are: the display shows whichever
// register is being written, the main clock divider has no reset (it runs
// through hard_reset so the button flip-flops are flushed), and the
// debouncer is reset by hard_reset.
module simple_door_lock
  import door_lock_pkg::*;
#(
  parameter int unsigned DIV_BITS = 10
) (
  input  logic                      Board_Clk,
  input  logic                      hard_reset,
  input  logic                      lck,
  input  logic                      clr_entered_code,
  input  logic [3:0]                button_n,
  output logic                      lock_light,
  output logic                      new_code_light,
  output logic                      hard_lock_light,
  output seg_t [DISPLAYS-1:0]       hex
);
  // ---------------- Part A: clock, lock switch, FSM, condition mux
  logic clk;
  logic lock_db;
  logic clr_q, clear_entry;
  logic select_in, select1, select0;
  logic btn_ctr_reset, add_attempt, switch_regs, att_reset;

  clock_divider_1024 #(.DIV_BITS(DIV_BITS)) u_clkdiv (
    .clk_in (Board_Clk), .rst (1'b0), .clk_out (clk)
  );

  debouncer #(.DIV_BITS(DIV_BITS)) u_debounce (
    .board (Board_Clk), .rst (hard_reset), .manual (lck), .out (lock_db)
  );

  always_ff @(posedge clk) clr_q <= clr_entered_code;
  assign clear_entry = clr_q | btn_ctr_reset;

  // condition inputs of the mux
  logic button_pressed, transition, code_match, attempts_full;

  mux_4_to_1 u_mux (
    .s1 (select1), .s0 (select0),
    .dat0 (button_pressed), .dat1 (transition), .dat2 (code_match), .dat3 (attempts_full),
    .sel (select_in)
  );

  fsm u_fsm (
    .clk (clk), .async_reset (hard_reset), .select_in, .lock (lock_db),
    .select1, .select0, .btn_ctr_reset, .add_attempt,
    .lock_light, .hard_lock_light, .new_code_light, .switch_regs, .att_reset
  );

  // ---------------- Part B: attempts, code entry, registers, comparison
  attempt_counter u_attempts (
    .inc_attempts (add_attempt), .async_reset_attempts (hard_reset | att_reset),
    .hard_reset_indicator (attempts_full)
  );

  logic [2:0] en7;
  logic [1:0] load_data, write_address;
  logic       write_enable;

  code_entering_module u_entry (
    .clk, .async_clr (clear_entry), .button_n,
    .button_pressed, .transition_signal (transition), .en7,
    .load_data, .write_address, .write_enable
  );

  code_t entered_code, stored_code;

  mod_reg_file #(.NUM_REGS(DIGITS), .WIDTH(DIGIT_W)) u_entered (
    .clk, .as_reset (1'b0), .ld_data (load_data),
    .wa0 (write_address[0]), .wa1 (write_address[1]),
    .wr (write_enable & switch_regs), .data (entered_code)
  );

  mod_reg_file #(.NUM_REGS(DIGITS), .WIDTH(DIGIT_W)) u_stored (
    .clk, .as_reset (hard_reset), .ld_data (load_data),
    .wa0 (write_address[0]), .wa1 (write_address[1]),
    .wr (write_enable & ~switch_regs), .data (stored_code)
  );

  subtractor_unit u_compare (.entered (entered_code), .stored (stored_code), .code_match);

  // ---------------- Part C: displays
  code_t shown;
  reg_content_selector u_select (
    .set_data0 (stored_code), .set_data1 (entered_code), .s (switch_regs), .out_data (shown)
  );

  for (genvar i = 0; i < DISPLAYS; i++) begin : g_hex
    seven_seg_decoder u_seg (.en (en7[i]), .w (shown[i]), .seg (hex[i]));
  end

endmodule
