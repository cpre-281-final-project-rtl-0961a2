// seven_seg_decoder: shows a 2-bit digit value as 1..4 on a seven-segment
// display.
//
// w = 00, 01, 10, 11 lights the digits 1, 2, 3, 4. Segments are active low
// (0 = lit) and packed {g,f,e,d,c,b,a}, with the usual layout: a top, b upper
// right, c lower right, d bottom, e lower left, f upper left, g middle.
// en = 1 shows the digit; en = 0 blanks the display (all segments 1).
// Purely combinational.
module seven_seg_decoder
  import door_lock_pkg::*;
(
  input  logic       en,
  input  logic [1:0] w,
  output seg_t       seg
);
  //                         gfedcba
  localparam seg_t DIGIT_1 = 7'b1111001;
  localparam seg_t DIGIT_2 = 7'b0100100;
  localparam seg_t DIGIT_3 = 7'b0110000;
  localparam seg_t DIGIT_4 = 7'b0011001;
  localparam seg_t BLANK   = 7'b1111111;

  always_comb begin
    if (!en) seg = BLANK;
    else begin
      unique case (w)
        2'd0: seg = DIGIT_1;
        2'd1: seg = DIGIT_2;
        2'd2: seg = DIGIT_3;
        2'd3: seg = DIGIT_4;
        default: seg = BLANK;
      endcase
    end
  end
endmodule
