// clock_function -- the running 24-hour clock and the stored alarm time.
//
// The clock time is kept in binary as tmp_hour (0..23), tmp_minute and
// tmp_second (0..59) and advances by one second on each rising edge of
// clk_1s: seconds wrap at 59 and carry into minutes, minutes wrap at 59 and
// carry into hours, hours wrap after 23 back to 00:00:00.
//
// While LD_time is on, each clk_1s edge loads the entered time into the clock
// instead of advancing it: hours = 10*H_in1 + H_in0, minutes = 10*M_in1 +
// M_in0, seconds = 0. While LD_alarm is on, each clk_1s edge copies the
// entered digits into the alarm time a_hour1..a_min0, with the alarm seconds
// a_sec1:a_sec0 set to 00. The two loads are independent and may happen
// together; the clock keeps running while only LD_alarm is on.
//
// Loading through level-sensitive switches sampled on clk_1s, the binary clock
// registers and the BCD alarm registers follow the design. Clearing the
// seconds on a load and wrapping any hour of 23 or more back to 0 (so an
// entered hour beyond 23 cannot run on forever) are this design's choices.
// reset is asynchronous and active high and clears clock and alarm time.
// a_sec1/a_sec0 are constant 00; they are kept as ports because the alarm
// comparison and the alarm display work on all six digits of a time.
// Assertions check on every clk_1s edge that the clock time is a valid time.
// reset also disables the assertion checks, so lint may report reset as used
// both asynchronously and synchronously; that use is in the checks only.
module clock_function
  import alarm_clock_pkg::*;
(
  input  logic    clk_1s,
  input  logic    reset,
  input  logic    LD_time,
  input  logic    LD_alarm,
  input  bcd_t    H_in1,
  input  bcd_t    H_in0,
  input  bcd_t    M_in1,
  input  bcd_t    M_in0,
  output bcd_t    a_hour1,
  output bcd_t    a_hour0,
  output bcd_t    a_min1,
  output bcd_t    a_min0,
  output bcd_t    a_sec1,
  output bcd_t    a_sec0,
  output hour_t   tmp_hour,
  output minsec_t tmp_minute,
  output minsec_t tmp_second
);

  // Entered time converted to binary for the clock counters.
  hour_t   in_hour;
  minsec_t in_minute;
  always_comb begin
    in_hour   = hour_t'(5'(H_in1) * 5'd10 + 5'(H_in0));
    in_minute = minsec_t'(6'(M_in1) * 6'd10 + 6'(M_in0));
  end

  // Clock time.
  always_ff @(posedge clk_1s or posedge reset) begin
    if (reset) begin
      tmp_hour   <= '0;
      tmp_minute <= '0;
      tmp_second <= '0;
    end else if (LD_time) begin
      tmp_hour   <= in_hour;
      tmp_minute <= in_minute;
      tmp_second <= '0;
    end else if (tmp_second >= LAST_SEC) begin
      tmp_second <= '0;
      if (tmp_minute >= LAST_MIN) begin
        tmp_minute <= '0;
        tmp_hour   <= (tmp_hour >= LAST_HOUR) ? '0 : tmp_hour + 1'b1;
      end else begin
        tmp_minute <= tmp_minute + 1'b1;
      end
    end else begin
      tmp_second <= tmp_second + 1'b1;
    end
  end

  a_hour_valid: assert property (@(posedge clk_1s) disable iff (reset)
                                 LD_time || tmp_hour <= LAST_HOUR)
    else $error("clock hour %0d out of range", tmp_hour);
  a_minsec_valid: assert property (@(posedge clk_1s) disable iff (reset)
                                   tmp_minute <= LAST_MIN && tmp_second <= LAST_SEC)
    else $error("clock minute/second %0d/%0d out of range", tmp_minute, tmp_second);

  // Alarm time.
  always_ff @(posedge clk_1s or posedge reset) begin
    if (reset) begin
      {a_hour1, a_hour0, a_min1, a_min0, a_sec1, a_sec0} <= '0;
    end else if (LD_alarm) begin
      a_hour1 <= H_in1;
      a_hour0 <= H_in0;
      a_min1  <= M_in1;
      a_min0  <= M_in0;
      a_sec1  <= '0;
      a_sec0  <= '0;
    end
  end

endmodule
