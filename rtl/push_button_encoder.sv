// push_button_encoder: turns the pressed button into a 2-bit digit value.
//
// Buttons are active low and at most one is expected down: button 0, 1, 2, 3
// gives code 00, 01, 10, 11 (shown as digits 1..4). Purely combinational.
// The original leaves all other input patterns as don't-care; here the
// highest-numbered pressed button wins and no button gives 00.
module push_button_encoder (
  input  logic [3:0] button_n,
  output logic [1:0] code
);
  always_comb begin
    if      (!button_n[3]) code = 2'd3;
    else if (!button_n[2]) code = 2'd2;
    else if (!button_n[1]) code = 2'd1;
    else                   code = 2'd0;
  end
endmodule
