// time_input -- the four digits of the time the user is entering.
//
// H_in1:H_in0 are the hour tens and units, M_in1:M_in0 the minute tens and
// units, each one BCD digit. The digits are clocked by clk_1s: at every rising
// edge of clk_1s at which increment_button is high, each digit whose select
// switch is on goes up by one. Holding the button therefore keeps stepping
// the selected digit once a second. A digit that would pass its largest value
// goes back to 0: hour tens after 2, hour units after 9 (after 3 while the
// hour tens is 2), minute tens after 5, minute units after 9. If stepping the
// hour tens to 2 would leave an hour above 23, the hour units go back to 0,
// so the entered time is always a valid 24-hour time. Several switches may be
// on at once; each selected digit steps on its own.
//
// The once-per-clk_1s stepping, the wrap-around and the hour tens limit follow
// the design; the 3 limit on the hour units, the clearing of the hour units,
// stepping all selected digits together and the active-high button are this
// design's choices.
// reset is asynchronous and active high and clears all four digits to 0.
// An assertion checks on every clk_1s edge that the digits form a valid time.
// reset also disables the assertion checks, so lint may report reset as used
// both asynchronously and synchronously; that use is in the checks only.
module time_input
  import alarm_clock_pkg::*;
(
  input  logic clk_1s,
  input  logic reset,
  input  logic increment_button,
  input  logic switch_Hin1,
  input  logic switch_Hin0,
  input  logic switch_Min1,
  input  logic switch_Min0,
  output bcd_t H_in1,
  output bcd_t H_in0,
  output bcd_t M_in1,
  output bcd_t M_in0
);

  // Next value of a digit stepped once, wrapping past max to 0.
  function automatic bcd_t step(input bcd_t d, input bcd_t max);
    return (d >= max) ? 4'd0 : d + 4'd1;
  endfunction

  // Next hour digits: step the selected ones, then keep the hour below 24.
  bcd_t h1_next, h0_next;
  always_comb begin
    h1_next = switch_Hin1 ? step(H_in1, HOUR_TENS_MAX) : H_in1;
    h0_next = switch_Hin0 ? step(H_in0, (H_in1 == HOUR_TENS_MAX) ? HOUR_UNITS_MAX2
                                                                 : HOUR_UNITS_MAX)
                          : H_in0;
    if (h1_next == HOUR_TENS_MAX && h0_next > HOUR_UNITS_MAX2) h0_next = '0;
  end

  always_ff @(posedge clk_1s or posedge reset) begin
    if (reset) begin
      H_in1 <= '0;
      H_in0 <= '0;
      M_in1 <= '0;
      M_in0 <= '0;
    end else if (increment_button) begin
      H_in1 <= h1_next;
      H_in0 <= h0_next;
      if (switch_Min1) M_in1 <= step(M_in1, MIN_TENS_MAX);
      if (switch_Min0) M_in0 <= step(M_in0, MIN_UNITS_MAX);
    end
  end

  a_entry_valid: assert property (@(posedge clk_1s) disable iff (reset)
      H_in1 <= HOUR_TENS_MAX && H_in0 <= HOUR_UNITS_MAX &&
      !(H_in1 == HOUR_TENS_MAX && H_in0 > HOUR_UNITS_MAX2) &&
      M_in1 <= MIN_TENS_MAX && M_in0 <= MIN_UNITS_MAX)
    else $error("entered time %0d%0d:%0d%0d is not valid", H_in1, H_in0, M_in1, M_in0);

endmodule
