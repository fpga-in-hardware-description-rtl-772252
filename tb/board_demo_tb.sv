// board_demo_tb -- replays the board demonstration of the alarm clock.
//
// The top runs with HALF_PERIOD = 4 (8 cycles per "second"). Using only the
// switches and the button, the testbench enters 01:53 and checks the entry
// display (01 53, blank seconds, E), loads it as the alarm time and checks
// the alarm display (01 53 00 A), enters 01:52 and loads it as the clock
// time, lets 39 seconds pass and checks the clock display (01 52 39 C). With
// AL_ON on it then runs to 01:53:00 and checks that the alarm LED stays off
// until that time has been reached and is on one second later.
`timescale 1ns/1ps
module board_demo_tb;
  import alarm_clock_pkg::*;
  import clock_tb_pkg::*;

  localparam int unsigned HP = 4;

  logic clk_50MHz = 1'b0;
  logic reset;
  logic switch_Hin1, switch_Hin0, switch_Min1, switch_Min0;
  logic LD_time, LD_alarm, ctime, atime, stime;
  logic increment_button, AL_ON, STOP_al;
  seg_t HEX0, HEX2, HEX3, HEX4, HEX5, HEX6, HEX7;
  logic Alarm;

  digital_clock_alarm #(.HALF_PERIOD(HP)) dut (.*);

  always #10 clk_50MHz = ~clk_50MHz;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic expect_display(input logic [6:0] letter, input int h1, input int h0,
                                input int m1, input int m0, input int s1, input int s0,
                                input string when);
    check(HEX0 == letter && decode(HEX7) == h1 && decode(HEX6) == h0 &&
          decode(HEX5) == m1 && decode(HEX4) == m0 && decode(HEX3) == s1 && decode(HEX2) == s0,
          $sformatf("%s: HEX0=%b shows %0d%0d:%0d%0d:%0d%0d", when, HEX0,
                    decode(HEX7), decode(HEX6), decode(HEX5), decode(HEX4),
                    decode(HEX3), decode(HEX2)));
  endtask

  task automatic seconds(input int n);
    repeat (2 * HP * n) @(posedge clk_50MHz);
    #1;
  endtask

  // Hold a digit switch and the button for n seconds.
  task automatic press(input logic [3:0] sw, input int n);
    {switch_Hin1, switch_Hin0, switch_Min1, switch_Min0} = sw;
    increment_button = 1'b1;
    seconds(n);
    {switch_Hin1, switch_Hin0, switch_Min1, switch_Min0} = '0;
    increment_button = 1'b0;
  endtask

  initial begin
    reset = 1'b1;
    {switch_Hin1, switch_Hin0, switch_Min1, switch_Min0, increment_button,
     LD_time, LD_alarm, ctime, atime, stime, AL_ON, STOP_al} = '0;
    repeat (3) @(posedge clk_50MHz);
    #1 reset = 1'b0;
    repeat (HP + 2) @(posedge clk_50MHz);   // 2 cycles after the first 1 Hz edge
    #1;

    stime = 1'b1;
    press(4'b0100, 1);    // hour units 0 -> 1
    press(4'b0010, 5);    // minute tens 0 -> 5
    press(4'b0001, 3);    // minute units 0 -> 3
    seconds(1);
    expect_display(REF_E, 0, 1, 5, 3, -1, -1, "entry 01:53");

    LD_alarm = 1'b1;
    seconds(1);
    LD_alarm = 1'b0;
    stime = 1'b0; atime = 1'b1;
    seconds(1);
    expect_display(REF_A, 0, 1, 5, 3, 0, 0, "alarm 01:53:00");

    atime = 1'b0; stime = 1'b1;
    press(4'b0001, 9);    // minute units 3 -> 9 -> 0 -> 2
    seconds(1);
    expect_display(REF_E, 0, 1, 5, 2, -1, -1, "entry 01:52");
    LD_time = 1'b1;
    seconds(1);
    LD_time = 1'b0;       // clock shows 01:52:00 now
    stime = 1'b0; ctime = 1'b1;
    seconds(39);
    expect_display(REF_C, 0, 1, 5, 2, 3, 9, "clock 01:52:39");

    AL_ON = 1'b1;
    for (int s = 40; s <= 60; s++) begin
      seconds(1);
      check(Alarm == 1'b0, $sformatf("no alarm before 01:53:00 (second %0d)", s));
    end
    expect_display(REF_C, 0, 1, 5, 3, 0, 0, "clock 01:53:00");
    seconds(1);
    check(Alarm == 1'b1, "alarm on after 01:53:00");
    expect_display(REF_C, 0, 1, 5, 3, 0, 1, "clock 01:53:01");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (2 * HP * 200) @(posedge clk_50MHz);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
