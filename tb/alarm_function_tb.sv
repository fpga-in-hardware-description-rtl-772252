// alarm_function_tb -- checks when the alarm turns on and off.
//
// clk_1s is driven directly. The reference alarm turns on at a clk_1s edge
// when the clock digits equal the alarm digits and AL_ON is on, and turns off
// only when STOP_al is on (STOP_al first). Directed steps check a match with
// AL_ON off, a match with AL_ON on, the alarm staying on after the match has
// passed and after AL_ON goes off, STOP_al, and reset; random stimuli with
// frequent matches are then compared with the reference every second.
`timescale 1ns/1ps
module alarm_function_tb;
  import alarm_clock_pkg::*;

  logic clk_1s = 1'b0;
  logic reset, AL_ON, STOP_al;
  bcd_t H_out1, H_out0, M_out1, M_out0, S_out1, S_out0;
  bcd_t a_hour1, a_hour0, a_min1, a_min0, a_sec1, a_sec0;
  logic Alarm;
  logic ref_alarm;
  int   checks = 0, failures = 0;
  int   rises = 0, stops = 0;

  alarm_function dut (.*);

  always #500 clk_1s = ~clk_1s;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // One second: clock digits, alarm digits, switches.
  task automatic second(input logic [23:0] clk_t, input logic [23:0] alm_t,
                        input logic on, input logic stop);
    logic prev;
    @(negedge clk_1s);
    {H_out1, H_out0, M_out1, M_out0, S_out1, S_out0} = clk_t;
    {a_hour1, a_hour0, a_min1, a_min0, a_sec1, a_sec0} = alm_t;
    AL_ON = on; STOP_al = stop;
    @(posedge clk_1s);
    prev = ref_alarm;
    if (stop) ref_alarm = 1'b0;
    else if (clk_t == alm_t && on) ref_alarm = 1'b1;
    if (!prev && ref_alarm) rises++;
    if (prev && !ref_alarm) stops++;
    #1 check(Alarm == ref_alarm, $sformatf("Alarm=%0b expected %0b (clock %h alarm %h on %0b stop %0b)",
                                          Alarm, ref_alarm, clk_t, alm_t, on, stop));
  endtask

  initial begin
    reset = 1'b1; AL_ON = 1'b0; STOP_al = 1'b0; ref_alarm = 1'b0;
    {H_out1, H_out0, M_out1, M_out0, S_out1, S_out0} = '0;
    {a_hour1, a_hour0, a_min1, a_min0, a_sec1, a_sec0} = 24'h015300;
    repeat (2) @(posedge clk_1s);
    #1 check(Alarm == 1'b0, "off in reset");
    #1 reset = 1'b0;

    second(24'h015259, 24'h015300, 1'b1, 1'b0);
    check(Alarm == 1'b0, "no match, no alarm");
    second(24'h015300, 24'h015300, 1'b0, 1'b0);
    check(Alarm == 1'b0, "match with AL_ON off, no alarm");
    second(24'h015300, 24'h015300, 1'b1, 1'b0);
    check(Alarm == 1'b1, "match with AL_ON on raises alarm");
    second(24'h015301, 24'h015300, 1'b1, 1'b0);
    check(Alarm == 1'b1, "alarm stays on after the match");
    second(24'h015302, 24'h015300, 1'b0, 1'b0);
    check(Alarm == 1'b1, "alarm stays on with AL_ON off");
    second(24'h015303, 24'h015300, 1'b1, 1'b1);
    check(Alarm == 1'b0, "STOP_al turns alarm off");
    second(24'h015300, 24'h015300, 1'b1, 1'b1);
    check(Alarm == 1'b0, "STOP_al wins over a match");
    // Seconds digits take part in the comparison.
    second(24'h015301, 24'h015300, 1'b1, 1'b0);
    check(Alarm == 1'b0, "seconds differ, no alarm");

    repeat (3000) begin
      logic [23:0] a, c;
      a = {4'($urandom_range(0, 2)), 4'($urandom_range(0, 9)), 4'($urandom_range(0, 5)),
           4'($urandom_range(0, 9)), 4'd0, 4'd0};
      c = ($urandom_range(0, 3) == 0) ? a : (a ^ (24'd1 << $urandom_range(0, 23)));
      second(c, a, 1'($urandom_range(0, 1)), ($urandom_range(0, 5) == 0));
    end
    check(rises > 10 && stops > 10, $sformatf("alarm rose %0d and stopped %0d times", rises, stops));

    @(negedge clk_1s);
    #100 reset = 1'b1;
    #1 check(Alarm == 1'b0, "asynchronous reset");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (10000) @(posedge clk_1s);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
