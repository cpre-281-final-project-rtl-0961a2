// mux_4_to_1: one-bit 4-to-1 multiplexer feeding the FSM's select_in.
//
// {s1, s0} = 00, 01, 10, 11 passes dat0, dat1, dat2, dat3. Purely
// combinational. In the lock, the FSM drives the select lines and the data
// inputs are button press, transition, code match and attempt limit.
module mux_4_to_1 (
  input  logic s1,
  input  logic s0,
  input  logic dat0,
  input  logic dat1,
  input  logic dat2,
  input  logic dat3,
  output logic sel
);
  logic [3:0] dat;
  assign dat = {dat3, dat2, dat1, dat0};
  assign sel = dat[{s1, s0}];
endmodule
