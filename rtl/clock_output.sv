// clock_output -- splits the binary clock time into six BCD digits.
//
// tmp_hour, tmp_minute and tmp_second (binary, as the running clock keeps
// them) become H_out1:H_out0, M_out1:M_out0 and S_out1:S_out0, the tens and
// units of each, for the display and for the alarm comparison. Purely
// combinational: the digits follow the clock registers in the same cycle.
// The six outputs and their use follow the design; doing the split by
// division and remainder by ten is this design's choice.
module clock_output
  import alarm_clock_pkg::*;
(
  input  hour_t   tmp_hour,
  input  minsec_t tmp_minute,
  input  minsec_t tmp_second,
  output bcd_t    H_out1,
  output bcd_t    H_out0,
  output bcd_t    M_out1,
  output bcd_t    M_out0,
  output bcd_t    S_out1,
  output bcd_t    S_out0
);

  always_comb begin
    H_out1 = bcd_t'(tmp_hour / 5'd10);
    H_out0 = bcd_t'(tmp_hour % 5'd10);
    M_out1 = bcd_t'(tmp_minute / 6'd10);
    M_out0 = bcd_t'(tmp_minute % 6'd10);
    S_out1 = bcd_t'(tmp_second / 6'd10);
    S_out0 = bcd_t'(tmp_second % 6'd10);
  end

endmodule
