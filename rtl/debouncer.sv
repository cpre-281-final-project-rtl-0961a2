// debouncer: samples the lock switch slowly enough that bounce is ignored.
//
// Two clock_divider_1024 stages in series divide the board clock by
// 2**(2*DIV_BITS) (about 48 Hz from 50 MHz at the default), and one flip-flop
// samples the raw switch on that slow clock. out therefore follows manual
// with a delay of up to one slow period and only changes at slow-clock edges.
// rst (active high, asynchronous) clears the dividers and the flip-flop; the
// reset is this design's addition, the rest follows the original.
module debouncer #(
  parameter int unsigned DIV_BITS = 10
) (
  input  logic board,
  input  logic rst,
  input  logic manual,
  output logic out
);
  logic clk_mid, clk_slow;

  clock_divider_1024 #(.DIV_BITS(DIV_BITS)) u_div0 (.clk_in(board),   .rst, .clk_out(clk_mid));
  clock_divider_1024 #(.DIV_BITS(DIV_BITS)) u_div1 (.clk_in(clk_mid), .rst, .clk_out(clk_slow));

  always_ff @(posedge clk_slow or posedge rst) begin
    if (rst) out <= 1'b0;
    else     out <= manual;
  end
endmodule
