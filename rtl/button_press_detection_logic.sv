// button_press_detection_logic: one-cycle pulse at the start of a press.
//
// The four active-low buttons are ORed into "some button is down", which is
// shifted through two flip-flops on clk. z = (newer sample is down) AND
// (older sample is up), so z is high for exactly one clock cycle, starting
// one clock edge after the press is first sampled, however long the button
// is held. Only one button is expected to be pressed at a time. The
// flip-flops have no reset, as in the original; they hold valid samples
// after two clocks with the buttons released.
module button_press_detection_logic (
  input  logic       clk,
  input  logic [3:0] button_n,
  output logic       z
);
  logic now_down, prev_down;

  always_ff @(posedge clk) begin
    now_down  <= ~&button_n;
    prev_down <= now_down;
  end

  assign z = now_down & ~prev_down;
endmodule
