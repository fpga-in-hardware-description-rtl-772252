// alarm_clock_pkg -- types and constants shared by the 24-hour alarm clock.
//
// A time is handled two ways in this design: as BCD digits (4 bits each),
// which is how the user enters it, how the alarm time is stored and how it is
// shown, and as binary hour/minute/second counts inside the running clock.
// The seven-segment patterns are active low, bit 6..0 = segments g..a, so a 0
// lights a segment. The digit, 'C' and 'E' patterns are the ones the design's
// simulation prints; the 'A' pattern is the usual one for that letter.
package alarm_clock_pkg;

  typedef logic [3:0] bcd_t;     // one decimal digit
  typedef logic [6:0] seg_t;     // active-low segments {g,f,e,d,c,b,a}
  typedef logic [4:0] hour_t;    // binary hours 0..23
  typedef logic [5:0] minsec_t;  // binary minutes or seconds 0..59

  // Largest value of each entered digit (24-hour format).
  localparam bcd_t HOUR_TENS_MAX   = 4'd2;
  localparam bcd_t HOUR_UNITS_MAX  = 4'd9;
  localparam bcd_t HOUR_UNITS_MAX2 = 4'd3;  // when the tens digit is 2
  localparam bcd_t MIN_TENS_MAX    = 4'd5;
  localparam bcd_t MIN_UNITS_MAX   = 4'd9;

  localparam hour_t   LAST_HOUR = 5'd23;
  localparam minsec_t LAST_MIN  = 6'd59;
  localparam minsec_t LAST_SEC  = 6'd59;

  localparam seg_t SEG_BLANK = 7'b1111111;
  localparam seg_t SEG_C     = 7'b1000110;  // clock time
  localparam seg_t SEG_A     = 7'b0001000;  // alarm time
  localparam seg_t SEG_E     = 7'b0000110;  // entry (input) time

  // Active-low pattern of a decimal digit; anything above 9 is blank.
  function automatic seg_t seg_digit(input bcd_t d);
    case (d)
      4'd0:    return 7'b1000000;
      4'd1:    return 7'b1111001;
      4'd2:    return 7'b0100100;
      4'd3:    return 7'b0110000;
      4'd4:    return 7'b0011001;
      4'd5:    return 7'b0010010;
      4'd6:    return 7'b0000010;
      4'd7:    return 7'b1111000;
      4'd8:    return 7'b0000000;
      4'd9:    return 7'b0010000;
      default: return SEG_BLANK;
    endcase
  endfunction

endpackage
