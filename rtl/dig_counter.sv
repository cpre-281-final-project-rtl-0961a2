// dig_counter: counts entered digits from 0 up to 4 and then stops.
//
// A 3-bit up counter, stepped on a rising clk edge when increment is high.
// The step is blocked once the count is 4 (transition = count bit 2), so the
// counter stays "full" until async_reset (active high) clears it. x1 x0, the
// low two bits, are the register address for the next digit; transition
// tells the FSM that four digits are in. The stop at four and the
// asynchronous clear follow the original; using increment as a clock enable
// rather than as the counter's clock is this design's choice.
module dig_counter (
  input  logic clk,
  input  logic async_reset,
  input  logic increment,
  output logic x1,
  output logic x0,
  output logic transition
);
  logic [2:0] count;

  always_ff @(posedge clk or posedge async_reset) begin
    if (async_reset)                   count <= '0;
    else if (increment && !count[2])   count <= count + 3'd1;
  end

  assign {transition, x1, x0} = count;

  a_max_four: assert property (@(posedge clk) disable iff (async_reset) count <= 3'd4);
endmodule
