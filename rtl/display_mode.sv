// display_mode -- chooses which time is shown and drives the seven displays.
//
// Three switches pick the time on the seven-segment displays: ctime the
// running clock, atime the alarm time, stime the time being entered. If more
// than one is on, ctime wins over atime and atime over stime; if none is on,
// every display is blank. The six digit displays read, left to right,
// HEX7 HEX6 : HEX5 HEX4 : HEX3 HEX2 = hour tens, hour units, minute tens,
// minute units, second tens, second units. HEX0 shows a letter for the mode:
// C for clock, A for alarm, E for entry. The entered time has no seconds, so
// HEX3 and HEX2 are blank in entry mode. HEX1 is not driven by this design.
//
// Segments are active low, bit 6..0 = g..a (see alarm_clock_pkg). The outputs
// are registered on clk_50MHz, so they follow the inputs one 50 MHz cycle
// later; this register has no reset and holds a valid pattern after the first
// clock edge.
//
// The three modes, their letters, the digit placement, the blank screen and
// the 50 MHz register follow the design; the priority between switches that
// are on together is this design's choice.
module display_mode
  import alarm_clock_pkg::*;
(
  input  logic clk_50MHz,
  input  logic ctime,
  input  logic atime,
  input  logic stime,
  input  bcd_t H_out1,
  input  bcd_t H_out0,
  input  bcd_t M_out1,
  input  bcd_t M_out0,
  input  bcd_t S_out1,
  input  bcd_t S_out0,
  input  bcd_t H_in1,
  input  bcd_t H_in0,
  input  bcd_t M_in1,
  input  bcd_t M_in0,
  input  bcd_t a_hour1,
  input  bcd_t a_hour0,
  input  bcd_t a_min1,
  input  bcd_t a_min0,
  input  bcd_t a_sec1,
  input  bcd_t a_sec0,
  output seg_t HEX0,
  output seg_t HEX2,
  output seg_t HEX3,
  output seg_t HEX4,
  output seg_t HEX5,
  output seg_t HEX6,
  output seg_t HEX7
);

  typedef enum logic [1:0] {MODE_BLANK, MODE_CLOCK, MODE_ALARM, MODE_INPUT} mode_e;

  mode_e mode;
  always_comb begin
    if      (ctime) mode = MODE_CLOCK;
    else if (atime) mode = MODE_ALARM;
    else if (stime) mode = MODE_INPUT;
    else            mode = MODE_BLANK;
  end

  seg_t hex0_d, hex2_d, hex3_d, hex4_d, hex5_d, hex6_d, hex7_d;
  always_comb begin
    unique case (mode)
      MODE_CLOCK: begin
        hex0_d = SEG_C;
        hex2_d = seg_digit(S_out0);
        hex3_d = seg_digit(S_out1);
        hex4_d = seg_digit(M_out0);
        hex5_d = seg_digit(M_out1);
        hex6_d = seg_digit(H_out0);
        hex7_d = seg_digit(H_out1);
      end
      MODE_ALARM: begin
        hex0_d = SEG_A;
        hex2_d = seg_digit(a_sec0);
        hex3_d = seg_digit(a_sec1);
        hex4_d = seg_digit(a_min0);
        hex5_d = seg_digit(a_min1);
        hex6_d = seg_digit(a_hour0);
        hex7_d = seg_digit(a_hour1);
      end
      MODE_INPUT: begin
        hex0_d = SEG_E;
        hex2_d = SEG_BLANK;
        hex3_d = SEG_BLANK;
        hex4_d = seg_digit(M_in0);
        hex5_d = seg_digit(M_in1);
        hex6_d = seg_digit(H_in0);
        hex7_d = seg_digit(H_in1);
      end
      default: begin
        hex0_d = SEG_BLANK;
        hex2_d = SEG_BLANK;
        hex3_d = SEG_BLANK;
        hex4_d = SEG_BLANK;
        hex5_d = SEG_BLANK;
        hex6_d = SEG_BLANK;
        hex7_d = SEG_BLANK;
      end
    endcase
  end

  always_ff @(posedge clk_50MHz) begin
    HEX0 <= hex0_d;
    HEX2 <= hex2_d;
    HEX3 <= hex3_d;
    HEX4 <= hex4_d;
    HEX5 <= hex5_d;
    HEX6 <= hex6_d;
    HEX7 <= hex7_d;
  end

endmodule
