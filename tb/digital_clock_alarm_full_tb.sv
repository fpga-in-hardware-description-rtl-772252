// digital_clock_alarm_full_tb -- one complete alarm cycle at full size.
//
// The top runs with its real divide ratio: 25,000,000 cycles of the 50 MHz
// clock per half second, so each step below is one real second (50,000,000
// cycles). The testbench follows the rising edges of the 1 Hz clock by
// counting 50 MHz cycles only, which also checks the 1 s period.
//
// Sequence, one step per second: enter 00:01 (minute-units switch and button)
// with the entry display on; load it as the alarm time and show it; load it as
// the clock time; with AL_ON on the clock matches 00:01:00 and the alarm LED
// turns on while the display shows the clock; STOP_al turns it off. The
// displays are decoded with the reference patterns of clock_tb_pkg.
`timescale 1ns/1ps
module digital_clock_alarm_full_tb;
  import alarm_clock_pkg::*;
  import clock_tb_pkg::*;

  localparam int unsigned HP = 25_000_000;

  logic clk_50MHz = 1'b0;
  logic reset;
  logic switch_Hin1, switch_Hin0, switch_Min1, switch_Min0;
  logic LD_time, LD_alarm, ctime, atime, stime;
  logic increment_button, AL_ON, STOP_al;
  seg_t HEX0, HEX2, HEX3, HEX4, HEX5, HEX6, HEX7;
  logic Alarm;

  digital_clock_alarm dut (.*);

  always #10 clk_50MHz = ~clk_50MHz;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Expected displays: letter and the six digits (-1 = blank).
  task automatic expect_display(input logic [6:0] letter, input int h1, input int h0,
                                input int m1, input int m0, input int s1, input int s0,
                                input string when);
    check(HEX0 == letter && decode(HEX7) == h1 && decode(HEX6) == h0 &&
          decode(HEX5) == m1 && decode(HEX4) == m0 && decode(HEX3) == s1 && decode(HEX2) == s0,
          $sformatf("%s: HEX0=%b shows %0d%0d:%0d%0d:%0d%0d", when, HEX0,
                    decode(HEX7), decode(HEX6), decode(HEX5), decode(HEX4),
                    decode(HEX3), decode(HEX2)));
  endtask

  // From two cycles after one 1 Hz rising edge to two cycles after the next.
  task automatic one_second();
    repeat (2 * HP) @(posedge clk_50MHz);
    #1;
  endtask

  initial begin
    reset = 1'b1;
    {switch_Hin1, switch_Hin0, switch_Min1, switch_Min0, increment_button,
     LD_time, LD_alarm, ctime, atime, stime, AL_ON, STOP_al} = '0;
    stime = 1'b1;
    repeat (3) @(posedge clk_50MHz);
    #1 reset = 1'b0;
    repeat (HP + 2) @(posedge clk_50MHz);
    #1 expect_display(REF_E, 0, 0, 0, 0, -1, -1, "after reset");

    switch_Min0 = 1'b1; increment_button = 1'b1;
    one_second();
    expect_display(REF_E, 0, 0, 0, 1, -1, -1, "entered 00:01");

    switch_Min0 = 1'b0; increment_button = 1'b0; LD_alarm = 1'b1;
    stime = 1'b0; atime = 1'b1;
    one_second();
    expect_display(REF_A, 0, 0, 0, 1, 0, 0, "alarm 00:01:00");

    LD_alarm = 1'b0; LD_time = 1'b1; atime = 1'b0; ctime = 1'b1;
    one_second();
    expect_display(REF_C, 0, 0, 0, 1, 0, 0, "clock loaded 00:01:00");
    check(Alarm == 1'b0, "no alarm before the match is seen");

    LD_time = 1'b0; AL_ON = 1'b1;
    one_second();
    expect_display(REF_C, 0, 0, 0, 1, 0, 1, "clock 00:01:01");
    check(Alarm == 1'b1, "alarm on after matching 00:01:00");

    STOP_al = 1'b1;
    one_second();
    check(Alarm == 1'b0, "STOP_al turns the alarm off");
    expect_display(REF_C, 0, 0, 0, 1, 0, 2, "clock 00:01:02");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (2 * HP * 8) @(posedge clk_50MHz);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
