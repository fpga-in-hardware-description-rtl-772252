// clock_tb_pkg -- reference values shared by the alarm clock testbenches.
//
// Holds the active-low seven-segment patterns (bit 6..0 = g..a) as printed in
// the original simulation waveforms for the digits 0-9 and the letters C and
// E, plus the usual pattern of A. They are written out here independently of
// the design's package, so that a wrong pattern in the design is caught.
package clock_tb_pkg;

  localparam logic [6:0] REF_DIGIT [10] = '{
    7'b1000000, 7'b1111001, 7'b0100100, 7'b0110000, 7'b0011001,
    7'b0010010, 7'b0000010, 7'b1111000, 7'b0000000, 7'b0010000
  };
  localparam logic [6:0] REF_BLANK = 7'b1111111;
  localparam logic [6:0] REF_C     = 7'b1000110;
  localparam logic [6:0] REF_A     = 7'b0001000;
  localparam logic [6:0] REF_E     = 7'b0000110;

  // Digit shown by an active-low pattern, -1 for blank, -2 if unknown.
  function automatic int decode(input logic [6:0] seg);
    if (seg == REF_BLANK) return -1;
    for (int i = 0; i < 10; i++)
      if (REF_DIGIT[i] == seg) return i;
    return -2;
  endfunction

endpackage
