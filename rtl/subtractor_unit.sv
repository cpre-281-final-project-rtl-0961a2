// subtractor_unit: tells whether the entered code equals the stored code.
//
// For every digit a two_bit_adder computes entered - stored in two's
// complement (stored inverted, carry in 1, carry out dropped). The code
// matches when all four 2-bit differences are zero, which a NOR over the
// eight difference bits detects. Purely combinational; code_match is 1 for
// equal codes. This is the original's subtract-and-NOR structure.
module subtractor_unit
  import door_lock_pkg::*;
(
  input  code_t entered,
  input  code_t stored,
  output logic  code_match
);
  code_t diff;

  for (genvar i = 0; i < DIGITS; i++) begin : g_digit
    logic unused_carry;
    two_bit_adder u_sub (
      .x     (entered[i]),
      .y     (~stored[i]),
      .c_in  (1'b1),
      .s     (diff[i]),
      .c_out (unused_carry)
    );
  end

  assign code_match = ~|diff;
endmodule
