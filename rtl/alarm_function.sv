// alarm_function -- raises the alarm when the clock reaches the alarm time.
//
// On each rising edge of clk_1s the six clock digits H_out1..S_out0 are
// compared with the six alarm digits a_hour1..a_sec0. When they are equal and
// the AL_ON switch is on, Alarm (the red LED) turns on. Once on it stays on,
// whatever the time and AL_ON do, until the STOP_al switch is on; STOP_al
// wins over a match in the same second. With AL_ON off a match does nothing.
//
// The comparison, the AL_ON enable, the latching until STOP_al and the clk_1s
// clock follow the design; STOP_al winning over a simultaneous match is this
// design's choice. Since the alarm seconds are always 00, the clock matches
// the alarm time for one second, at the start of the alarm minute.
// reset is asynchronous and active high and turns the alarm off.
module alarm_function
  import alarm_clock_pkg::*;
(
  input  logic clk_1s,
  input  logic reset,
  input  bcd_t H_out1,
  input  bcd_t H_out0,
  input  bcd_t M_out1,
  input  bcd_t M_out0,
  input  bcd_t S_out1,
  input  bcd_t S_out0,
  input  bcd_t a_hour1,
  input  bcd_t a_hour0,
  input  bcd_t a_min1,
  input  bcd_t a_min0,
  input  bcd_t a_sec1,
  input  bcd_t a_sec0,
  input  logic AL_ON,
  input  logic STOP_al,
  output logic Alarm
);

  logic match;
  assign match = ({H_out1, H_out0, M_out1, M_out0, S_out1, S_out0} ==
                  {a_hour1, a_hour0, a_min1, a_min0, a_sec1, a_sec0});

  always_ff @(posedge clk_1s or posedge reset) begin
    if (reset)                Alarm <= 1'b0;
    else if (STOP_al)         Alarm <= 1'b0;
    else if (match && AL_ON)  Alarm <= 1'b1;
  end

endmodule
