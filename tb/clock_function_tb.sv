// clock_function_tb -- checks the running clock and the alarm-time store.
//
// The reference keeps the clock as seconds of the day (0..86399) and adds one
// per clk_1s edge modulo 86400; the alarm time as four digits with seconds 00.
// Directed steps check loading with LD_time and LD_alarm, the clock running
// on while LD_alarm is on, the minute, hour and midnight carries, and reset.
// Then random loads and long stretches of free running are compared with the
// reference on every clk_1s edge.
`timescale 1ns/1ps
module clock_function_tb;
  import alarm_clock_pkg::*;

  logic    clk_1s = 1'b0;
  logic    reset, LD_time, LD_alarm;
  bcd_t    H_in1, H_in0, M_in1, M_in0;
  bcd_t    a_hour1, a_hour0, a_min1, a_min0, a_sec1, a_sec0;
  hour_t   tmp_hour;
  minsec_t tmp_minute, tmp_second;
  int      checks = 0, failures = 0;
  int      ref_sod;          // reference clock, seconds of day
  int      ref_alarm[4];     // reference alarm digits h1 h0 m1 m0
  int      midnights = 0;

  clock_function dut (.*);

  always #500 clk_1s = ~clk_1s;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic compare(input string when);
    int sod;
    sod = tmp_hour * 3600 + tmp_minute * 60 + tmp_second;
    check(sod == ref_sod && tmp_minute < 60 && tmp_second < 60,
          $sformatf("%s: clock %0d:%0d:%0d, expected %0d s of day", when,
                    tmp_hour, tmp_minute, tmp_second, ref_sod));
    check(a_hour1 == ref_alarm[0] && a_hour0 == ref_alarm[1] &&
          a_min1 == ref_alarm[2] && a_min0 == ref_alarm[3] &&
          a_sec1 == 0 && a_sec0 == 0,
          $sformatf("%s: alarm %0d%0d:%0d%0d:%0d%0d", when,
                    a_hour1, a_hour0, a_min1, a_min0, a_sec1, a_sec0));
  endtask

  // One second with the given load switches and entered digits.
  task automatic second(input logic ldt, input logic lda, input int h, input int m);
    @(negedge clk_1s);
    LD_time = ldt; LD_alarm = lda;
    H_in1 = bcd_t'(h / 10); H_in0 = bcd_t'(h % 10);
    M_in1 = bcd_t'(m / 10); M_in0 = bcd_t'(m % 10);
    @(posedge clk_1s);
    if (ldt) ref_sod = h * 3600 + m * 60;
    else begin
      ref_sod = (ref_sod + 1) % 86400;
      if (ref_sod == 0) midnights++;
    end
    if (lda) ref_alarm = '{h / 10, h % 10, m / 10, m % 10};
    #1 compare("step");
  endtask

  initial begin
    reset = 1'b1; LD_time = 1'b0; LD_alarm = 1'b0;
    {H_in1, H_in0, M_in1, M_in0} = '0;
    ref_sod = 0; ref_alarm = '{0, 0, 0, 0};
    repeat (2) @(posedge clk_1s);
    #1 compare("in reset");
    #1 reset = 1'b0;

    // Free running from 00:00:00 across the first minute carry.
    repeat (65) second(1'b0, 1'b0, 0, 0);
    check(tmp_minute == 1 && tmp_second == 5, "00:01:05 after 65 s");
    // Load the clock, then the alarm while the clock keeps running.
    second(1'b1, 1'b0, 12, 34);
    check(tmp_hour == 12 && tmp_minute == 34 && tmp_second == 0, "LD_time loads 12:34:00");
    second(1'b0, 1'b1, 7, 45);
    check(a_hour0 == 7 && a_min1 == 4 && a_min0 == 5 && tmp_second == 1,
          "LD_alarm loads 07:45 and clock runs on");
    // Hour carry and midnight.
    second(1'b1, 1'b0, 9, 59);
    repeat (60) second(1'b0, 1'b0, 0, 0);
    check(tmp_hour == 10 && tmp_minute == 0 && tmp_second == 0, "hour carry 09:59:59 -> 10:00:00");
    second(1'b1, 1'b0, 23, 59);
    repeat (60) second(1'b0, 1'b0, 0, 0);
    check(tmp_hour == 0 && tmp_minute == 0 && tmp_second == 0, "midnight 23:59:59 -> 00:00:00");
    // Holding LD_time keeps the clock at the entered time.
    repeat (3) second(1'b1, 1'b0, 5, 6);
    check(tmp_hour == 5 && tmp_minute == 6 && tmp_second == 0, "LD_time held");

    // Random loads and running.
    repeat (300) begin
      int n;
      second(1'($urandom_range(0, 1)), 1'($urandom_range(0, 1)),
             $urandom_range(0, 23), $urandom_range(0, 59));
      n = $urandom_range(0, 200);
      repeat (n) second(1'b0, 1'b0, 0, 0);
    end
    // One more midnight from a random near-midnight load.
    second(1'b1, 1'b0, 23, 58);
    repeat (200) second(1'b0, 1'b0, 0, 0);
    check(midnights >= 2, "midnight carry exercised");

    @(negedge clk_1s);
    #100 reset = 1'b1;
    #1;
    ref_sod = 0; ref_alarm = '{0, 0, 0, 0};
    compare("asynchronous reset");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk_1s);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
