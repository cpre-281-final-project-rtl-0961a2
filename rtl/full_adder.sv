// full_adder: one-bit full adder.
//
// si = xi xor yi xor ci; ci_1 (carry out) is 1 when at least two of the
// three inputs are 1. Purely combinational.
module full_adder (
  input  logic xi,
  input  logic yi,
  input  logic ci,
  output logic si,
  output logic ci_1
);
  assign si   = xi ^ yi ^ ci;
  assign ci_1 = (xi & yi) | (ci & (xi ^ yi));
endmodule
