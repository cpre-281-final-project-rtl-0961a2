// code_entering_module: turns button presses into register writes.
//
// Each new press (button_pressed, one clock long, from
// button_press_detection_logic) writes the pressed digit (load_data, the
// push_button_encoder output registered on clk) to the register at
// write_address, then advances dig_counter to the next address. After the
// fourth digit transition_signal rises, write_enable is blocked and the
// display enables en7 go dark until async_clr clears the counter.
//
// Timing, with edge 1 the first clock that samples the press:
//   after edge 1  button_pressed = write_enable = 1, load_data = digit
//   edge 2        the register file stores the digit at write_address
//                 (the FSM also acts on button_pressed at this edge)
//   half a clock later (falling edge) dig_counter steps to the next address
// The press pulse is delayed by one flip-flop before it reaches the counter,
// as in the original, so the counter moves only after the write. Stepping the
// counter on the falling clock edge, which makes that order exact and lets a
// clear released by the FSM at edge 2 end before the step, is this design's
// choice. async_clr is active high.
module code_entering_module (
  input  logic       clk,
  input  logic       async_clr,
  input  logic [3:0] button_n,
  output logic       button_pressed,
  output logic       transition_signal,
  output logic [2:0] en7,
  output logic [1:0] load_data,
  output logic [1:0] write_address,
  output logic       write_enable
);
  logic       z, z_d;
  logic [1:0] code;

  button_press_detection_logic u_detect (.clk, .button_n, .z);
  push_button_encoder          u_encode (.button_n, .code);

  always_ff @(posedge clk) begin
    load_data <= code;
    z_d       <= z;
  end

  dig_counter u_count (
    .clk         (~clk),
    .async_reset (async_clr),
    .increment   (z_d),
    .x1          (write_address[1]),
    .x0          (write_address[0]),
    .transition  (transition_signal)
  );

  enable_seven_segs u_enables (
    .addr0    (write_address[0]),
    .addr1    (write_address[1]),
    .endstate (transition_signal),
    .seven0   (en7[0]),
    .seven1   (en7[1]),
    .seven2   (en7[2])
  );

  assign button_pressed = z;
  assign write_enable   = z & ~transition_signal;
endmodule
