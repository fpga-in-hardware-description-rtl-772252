// digital_clock_alarm_tb -- end-to-end test of the complete alarm clock.
//
// The top runs with HALF_PERIOD = 4, so one "second" is 8 cycles of the
// 50 MHz clock. The testbench keeps its own model of the clock: entered
// digits, clock time as seconds of the day, alarm digits and the alarm flag.
// It applies the switches and button just after each rising edge of the
// internal 1 Hz clock (whose timing it derives from the divide ratio alone)
// and, one second later, compares every display and the Alarm LED with the
// model, decoding the segments with the reference patterns of clock_tb_pkg.
//
// A directed part follows the original demonstration: enter 00:01 with the
// minute-units switch and the button, load it as alarm time, enter 23:59 and
// load it as clock time, let the clock pass midnight and reach the alarm
// with AL_ON on, then stop the alarm. A random part follows. Each mechanism
// (digit step, digit wrap, both loads, the four display modes, minute carry,
// midnight, alarm raised, alarm ignored with AL_ON off, alarm held, alarm
// stopped) is counted and must have happened at least once.
`timescale 1ns/1ps
module digital_clock_alarm_tb;
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

  // ---- reference model ----
  int m_in[4];          // entered H1 H0 M1 M0
  int m_sod;            // clock, seconds of day
  int m_alm[4];         // alarm H1 H0 M1 M0 (seconds 00)
  bit m_alarm;

  typedef enum int {EV_STEP, EV_WRAP, EV_LDTIME, EV_LDALARM, EV_SHOW_C, EV_SHOW_A,
                    EV_SHOW_E, EV_BLANK, EV_MIN_CARRY, EV_MIDNIGHT, EV_RAISE,
                    EV_IGNORED, EV_HELD, EV_STOP, EV_COUNT} event_e;
  int seen[EV_COUNT];

  task automatic model_edge();
    int lim0, sod_next;
    bit match, prev;
    // Alarm compares the clock time as it was before this edge.
    match = (m_sod / 3600 == m_alm[0] * 10 + m_alm[1]) &&
            ((m_sod / 60) % 60 == m_alm[2] * 10 + m_alm[3]) && (m_sod % 60 == 0);
    prev = m_alarm;
    if (STOP_al) m_alarm = 0;
    else if (match && AL_ON) m_alarm = 1;
    if (!prev && m_alarm) seen[EV_RAISE]++;
    if (prev && m_alarm && !match) seen[EV_HELD]++;
    if (prev && !m_alarm) seen[EV_STOP]++;
    if (match && !AL_ON && !prev) seen[EV_IGNORED]++;
    // Clock and alarm time (loads use the entered digits before this edge).
    if (LD_time) begin
      m_sod = (m_in[0] * 10 + m_in[1]) * 3600 + (m_in[2] * 10 + m_in[3]) * 60;
      seen[EV_LDTIME]++;
    end else begin
      sod_next = (m_sod + 1) % 86400;
      if (sod_next % 60 == 0) seen[EV_MIN_CARRY]++;
      if (sod_next == 0) seen[EV_MIDNIGHT]++;
      m_sod = sod_next;
    end
    if (LD_alarm) begin
      m_alm = m_in;
      seen[EV_LDALARM]++;
    end
    // Entered digits.
    if (increment_button) begin
      lim0 = (m_in[0] == 2) ? 3 : 9;
      if (switch_Hin1) m_in[0] = (m_in[0] >= 2) ? 0 : m_in[0] + 1;
      if (switch_Hin0) m_in[1] = (m_in[1] >= lim0) ? 0 : m_in[1] + 1;
      if (m_in[0] == 2 && m_in[1] > 3) m_in[1] = 0;
      if (switch_Min1) m_in[2] = (m_in[2] >= 5) ? 0 : m_in[2] + 1;
      if (switch_Min0) m_in[3] = (m_in[3] >= 9) ? 0 : m_in[3] + 1;
      if (switch_Hin1 || switch_Hin0 || switch_Min1 || switch_Min0) seen[EV_STEP]++;
      if ((switch_Hin1 && m_in[0] == 0) || (switch_Hin0 && m_in[1] == 0) ||
          (switch_Min1 && m_in[2] == 0) || (switch_Min0 && m_in[3] == 0)) seen[EV_WRAP]++;
    end
  endtask

  // Compare the displays and the LED with the model.
  task automatic compare(input string when);
    int d[6];
    logic [6:0] letter;
    if (ctime) begin
      d = '{m_sod / 36000, (m_sod / 3600) % 10, ((m_sod / 60) % 60) / 10, (m_sod / 60) % 10,
            (m_sod % 60) / 10, m_sod % 10};
      letter = REF_C; seen[EV_SHOW_C]++;
    end else if (atime) begin
      d = '{m_alm[0], m_alm[1], m_alm[2], m_alm[3], 0, 0};
      letter = REF_A; seen[EV_SHOW_A]++;
    end else if (stime) begin
      d = '{m_in[0], m_in[1], m_in[2], m_in[3], -1, -1};
      letter = REF_E; seen[EV_SHOW_E]++;
    end else begin
      d = '{-1, -1, -1, -1, -1, -1};
      letter = REF_BLANK; seen[EV_BLANK]++;
    end
    check(HEX0 == letter, $sformatf("%s: HEX0=%b expected %b", when, HEX0, letter));
    check(decode(HEX7) == d[0] && decode(HEX6) == d[1] && decode(HEX5) == d[2] &&
          decode(HEX4) == d[3] && decode(HEX3) == d[4] && decode(HEX2) == d[5],
          $sformatf("%s: shows %0d%0d:%0d%0d:%0d%0d expected %0d%0d:%0d%0d:%0d%0d", when,
                    decode(HEX7), decode(HEX6), decode(HEX5), decode(HEX4), decode(HEX3), decode(HEX2),
                    d[0], d[1], d[2], d[3], d[4], d[5]));
    check(Alarm == m_alarm, $sformatf("%s: Alarm=%0b expected %0b", when, Alarm, m_alarm));
  endtask

  // Inputs of one second, given as a struct.
  typedef struct packed {
    logic hin1, hin0, min1, min0, btn, ldt, lda, ct, at, st, on, stop;
  } in_t;

  // Called two 50 MHz cycles after a 1 Hz rising edge (the display register
  // has then caught up): apply inputs, run to the same point after the next
  // rising edge, update the model, then compare.
  task automatic second(input in_t i, input string when = "second");
    {switch_Hin1, switch_Hin0, switch_Min1, switch_Min0, increment_button,
     LD_time, LD_alarm, ctime, atime, stime, AL_ON, STOP_al} = i;
    repeat (2 * HP) @(posedge clk_50MHz);
    model_edge();
    #1 compare(when);
  endtask

  function automatic in_t mk(input bit st = 1, input bit ct = 0, input bit at = 0,
                             input logic [3:0] sw = 0, input bit btn = 0,
                             input bit ldt = 0, input bit lda = 0,
                             input bit on = 0, input bit stop = 0);
    return '{hin1: sw[3], hin0: sw[2], min1: sw[1], min0: sw[0], btn: btn,
             ldt: ldt, lda: lda, ct: ct, at: at, st: st, on: on, stop: stop};
  endfunction

  initial begin
    reset = 1'b1;
    {switch_Hin1, switch_Hin0, switch_Min1, switch_Min0, increment_button,
     LD_time, LD_alarm, ctime, atime, stime, AL_ON, STOP_al} = '0;
    stime = 1'b1;
    m_in = '{0, 0, 0, 0}; m_alm = '{0, 0, 0, 0}; m_sod = 0; m_alarm = 0;
    repeat (3) @(posedge clk_50MHz);
    #1 reset = 1'b0;
    // First 1 Hz rising edge: HP cycles after release. Compare two cycles
    // after it, the phase second() keeps.
    repeat (HP + 2) @(posedge clk_50MHz);
    model_edge();
    #1 compare("first edge");

    // Enter 00:01 and load it as the alarm time (as in the demonstration).
    second(mk(.sw(4'b0001), .btn(1)), "enter M_in0");
    check(m_in[3] == 1 && decode(HEX4) == 1 && HEX0 == REF_E, "entry shows 00:01");
    second(mk(.lda(1)), "LD_alarm");
    second(mk(.st(0), .at(1)), "show alarm");
    check(HEX0 == REF_A && decode(HEX4) == 1 && decode(HEX2) == 0, "alarm shows 00:01:00");
    // The clock passes the alarm time with AL_ON off: ignored.
    second(mk(.ldt(1)), "LD_time 00:01");
    second(mk(.ct(1)), "match, AL_ON off");
    check(Alarm == 1'b0, "AL_ON off keeps alarm off");
    // Enter 23:59: hour tens 0->2, hour units 0->9->0 wrap then 3,
    // minute tens 0->5, minute units 1->9.
    repeat (2)  second(mk(.sw(4'b1000), .btn(1)), "H_in1");
    repeat (4)  second(mk(.sw(4'b0100), .btn(1)), "H_in0");
    check(m_in[1] == 0, "hour units wrapped after 3");
    repeat (3)  second(mk(.sw(4'b0100), .btn(1)), "H_in0");
    repeat (5)  second(mk(.sw(4'b0010), .btn(1)), "M_in1");
    repeat (8)  second(mk(.sw(4'b0001), .btn(1)), "M_in0");
    check(m_in[0] == 2 && m_in[1] == 3 && m_in[2] == 5 && m_in[3] == 9, "entered 23:59");
    second(mk(.ldt(1)), "LD_time 23:59");
    // Run past midnight to the alarm at 00:01:00 with AL_ON on.
    repeat (121) second(mk(.st(0), .ct(1), .on(1)), "running");
    check(Alarm == 1'b1, "alarm raised at 00:01:00");
    repeat (5) second(mk(.st(0), .ct(1), .on(0)), "alarm held");
    check(Alarm == 1'b1, "alarm held until stopped");
    second(mk(.st(0), .ct(1), .stop(1)), "STOP_al");
    check(Alarm == 1'b0, "STOP_al clears alarm");
    second(mk(.st(0)), "blank");

    // Random operation.
    repeat (600) begin
      in_t r;
      r = in_t'($urandom);
      r.ldt  = ($urandom_range(0, 19) == 0);
      r.lda  = ($urandom_range(0, 9) == 0);
      r.stop = ($urandom_range(0, 15) == 0);
      second(r, "random");
    end

    for (int e = 0; e < EV_COUNT; e++) begin
      check(seen[e] > 0, $sformatf("mechanism %s never happened", event_e'(e)));
      $display("mechanism %-13s happened %0d times", event_e'(e), seen[e]);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (2 * HP * 2000) @(posedge clk_50MHz);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
