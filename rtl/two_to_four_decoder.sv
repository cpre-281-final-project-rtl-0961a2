// two_to_four_decoder: 2-to-4 decoder with enable.
//
// y[k] is 1 when en is 1 and {w1, w0} equals k; all outputs are 0 when en is
// 0. Purely combinational. Used by mod_reg_file to pick the register that
// loads on a write.
module two_to_four_decoder (
  input  logic       w0,
  input  logic       w1,
  input  logic       en,
  output logic [3:0] y
);
  always_comb begin
    y = '0;
    if (en) y[{w1, w0}] = 1'b1;
  end
endmodule
