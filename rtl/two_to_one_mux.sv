// two_to_one_mux: one-bit 2-to-1 multiplexer, z = s ? x1 : x0.
//
// Purely combinational. In mod_reg_file it chooses, for every flip-flop,
// between holding its value (x0) and loading new data (x1).
module two_to_one_mux (
  input  logic s,
  input  logic x0,
  input  logic x1,
  output logic z
);
  assign z = s ? x1 : x0;
endmodule
