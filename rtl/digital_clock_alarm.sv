// digital_clock_alarm -- top of the 24-hour digital clock with alarm.
//
// A 50 MHz board clock is divided to a 1 Hz clock (clock_division) that runs
// everything that keeps time: the entry of a time with four digit-select
// switches and a push button (time_input), the running clock and the stored
// alarm time (clock_function), and the alarm itself (alarm_function).
// clock_output turns the binary clock time into digits, and display_mode
// shows the clock, alarm or entered time on seven seven-segment displays
// (HEX0 and HEX2..HEX7; HEX0 carries the mode letter C, A or E).
//
// Inputs: reset (active high, asynchronous; clears clock, alarm and entered
// time), clk_50MHz, the digit selects switch_Hin1/Hin0/Min1/Min0,
// increment_button (active high; steps the selected digits once per second
// while held), LD_time and LD_alarm (load the entered time into the clock or
// the alarm on the next 1 Hz edge), ctime/atime/stime (display mode), AL_ON
// (alarm enable) and STOP_al (alarm off). Outputs: HEX0, HEX2..HEX7 (active
// low, bit 6..0 = g..a) and Alarm (the red LED).
//
// The 14 inputs, 8 outputs and the six blocks with their connections follow
// the design. HALF_PERIOD sets the 50 MHz cycles per half second and exists
// so that simulations can run a faster clock; its default is the real one.
module digital_clock_alarm
  import alarm_clock_pkg::*;
#(
  parameter int unsigned HALF_PERIOD = 25_000_000
) (
  input  logic reset,
  input  logic clk_50MHz,
  input  logic switch_Hin1,
  input  logic switch_Hin0,
  input  logic switch_Min1,
  input  logic switch_Min0,
  input  logic LD_time,
  input  logic LD_alarm,
  input  logic ctime,
  input  logic atime,
  input  logic stime,
  input  logic increment_button,
  input  logic AL_ON,
  input  logic STOP_al,
  output seg_t HEX0,
  output seg_t HEX2,
  output seg_t HEX3,
  output seg_t HEX4,
  output seg_t HEX5,
  output seg_t HEX6,
  output seg_t HEX7,
  output logic Alarm
);

  logic    clk_1s;
  bcd_t    H_in1, H_in0, M_in1, M_in0;
  bcd_t    a_hour1, a_hour0, a_min1, a_min0, a_sec1, a_sec0;
  hour_t   tmp_hour;
  minsec_t tmp_minute, tmp_second;
  bcd_t    H_out1, H_out0, M_out1, M_out0, S_out1, S_out0;

  clock_division #(.HALF_PERIOD(HALF_PERIOD)) u_clock_division (
    .clk_50MHz, .reset, .clk_1s
  );

  time_input u_time_input (
    .clk_1s, .reset, .increment_button,
    .switch_Hin1, .switch_Hin0, .switch_Min1, .switch_Min0,
    .H_in1, .H_in0, .M_in1, .M_in0
  );

  clock_function u_clock_function (
    .clk_1s, .reset, .LD_time, .LD_alarm,
    .H_in1, .H_in0, .M_in1, .M_in0,
    .a_hour1, .a_hour0, .a_min1, .a_min0, .a_sec1, .a_sec0,
    .tmp_hour, .tmp_minute, .tmp_second
  );

  clock_output u_clock_output (
    .tmp_hour, .tmp_minute, .tmp_second,
    .H_out1, .H_out0, .M_out1, .M_out0, .S_out1, .S_out0
  );

  display_mode u_display_mode (
    .clk_50MHz, .ctime, .atime, .stime,
    .H_out1, .H_out0, .M_out1, .M_out0, .S_out1, .S_out0,
    .H_in1, .H_in0, .M_in1, .M_in0,
    .a_hour1, .a_hour0, .a_min1, .a_min0, .a_sec1, .a_sec0,
    .HEX0, .HEX2, .HEX3, .HEX4, .HEX5, .HEX6, .HEX7
  );

  alarm_function u_alarm_function (
    .clk_1s, .reset,
    .H_out1, .H_out0, .M_out1, .M_out0, .S_out1, .S_out0,
    .a_hour1, .a_hour0, .a_min1, .a_min0, .a_sec1, .a_sec0,
    .AL_ON, .STOP_al, .Alarm
  );

endmodule
