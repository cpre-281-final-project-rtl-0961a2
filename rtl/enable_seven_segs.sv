// enable_seven_segs: turns on one display per digit already entered.
//
// With {addr1, addr0} digits entered (0..3), displays 0 .. count-1 are on:
// seven0 for one or more digits, seven1 for two or more, seven2 for three.
// endstate (four digits entered) turns every display off, so the code
// disappears as soon as the fourth digit is in. Purely combinational.
module enable_seven_segs (
  input  logic addr0,
  input  logic addr1,
  input  logic endstate,
  output logic seven0,
  output logic seven1,
  output logic seven2
);
  logic [1:0] count;
  assign count  = {addr1, addr0};
  assign seven0 = !endstate && count >= 2'd1;
  assign seven1 = !endstate && count >= 2'd2;
  assign seven2 = !endstate && count == 2'd3;
endmodule
