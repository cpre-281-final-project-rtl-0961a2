// clock_divider_1024: divides clk_in by 2**DIV_BITS (1024 by default).
//
// A free-running DIV_BITS-bit up counter clocked by clk_in; its most
// significant bit is clk_out, a square wave of period 2**DIV_BITS input
// cycles that rises when the counter wraps past the half-way value. The
// original builds the same counter from ten toggle flip-flops chained by AND
// gates; the asynchronous reset (active high, clears the counter, so clk_out
// is low for the first 2**(DIV_BITS-1) cycles) is this design's addition.
module clock_divider_1024 #(
  parameter int unsigned DIV_BITS = 10
) (
  input  logic clk_in,
  input  logic rst,
  output logic clk_out
);
  logic [DIV_BITS-1:0] count;

  always_ff @(posedge clk_in or posedge rst) begin
    if (rst) count <= '0;
    else     count <= count + 1'b1;
  end

  assign clk_out = count[DIV_BITS-1];
endmodule
