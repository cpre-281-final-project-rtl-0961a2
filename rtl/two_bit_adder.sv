// two_bit_adder: 2-bit ripple-carry adder.
//
// Two full_adder stages: bit 0 adds x[0], y[0] and c_in; its carry feeds bit
// 1, whose carry is c_out. {c_out, s} = x + y + c_in. Combinational.
module two_bit_adder (
  input  logic [1:0] x,
  input  logic [1:0] y,
  input  logic       c_in,
  output logic [1:0] s,
  output logic       c_out
);
  logic c1;
  full_adder u_fa0 (.xi(x[0]), .yi(y[0]), .ci(c_in), .si(s[0]), .ci_1(c1));
  full_adder u_fa1 (.xi(x[1]), .yi(y[1]), .ci(c1),   .si(s[1]), .ci_1(c_out));
endmodule
