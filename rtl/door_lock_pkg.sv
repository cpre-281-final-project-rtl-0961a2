// door_lock_pkg: types and constants shared by the door-lock modules.
//
// A code is four digits, each digit 1..4 held as a 2-bit value (00 means 1,
// 11 means 4). The control FSM uses the 3-bit state encoding A=000 .. H=111;
// state A is unreachable and is kept only so that the encoding of B..H is
// the original one. Seven-segment patterns are active low, segment a in
// bit 0 through segment g in bit 6.
package door_lock_pkg;

  localparam int unsigned DIGITS  = 4;   // digits in a code
  localparam int unsigned DIGIT_W = 2;   // bits per digit
  localparam int unsigned DISPLAYS = 3;  // seven-segment digits driven

  typedef logic [DIGIT_W-1:0] digit_t;
  typedef digit_t [DIGITS-1:0] code_t;   // code_t[0] is the first digit entered
  typedef logic [6:0] seg_t;             // {g,f,e,d,c,b,a}, 0 = lit

  typedef enum logic [2:0] {
    ST_A = 3'b000,  // unused
    ST_B = 3'b001,  // idle, waiting for the first digit of an unlock attempt
    ST_C = 3'b010,  // entering an unlock code
    ST_D = 3'b011,  // comparing entered and stored code
    ST_E = 3'b100,  // unlocked
    ST_F = 3'b101,  // entering a new code
    ST_G = 3'b110,  // wrong code: count the attempt
    ST_H = 3'b111   // locked until hard reset
  } state_t;

  // Input-mux select codes {select1, select0}
  localparam logic [1:0] SEL_PRESS      = 2'b00;
  localparam logic [1:0] SEL_TRANSITION = 2'b01;
  localparam logic [1:0] SEL_MATCH      = 2'b10;
  localparam logic [1:0] SEL_ATTEMPTS   = 2'b11;

endpackage
