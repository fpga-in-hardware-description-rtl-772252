// time_input_tb -- checks digit entry with the select switches and button.
//
// clk_1s is driven directly. A reference model keeps its own four digits as
// integers and steps them by the entry rules: hour tens 0-2, hour units 0-9
// (0-3 while the hour tens is 2), minute tens 0-5, minute units 0-9, each
// wrapping to 0, with the hour units cleared if the hour would pass 23. Directed steps check single-digit stepping, holding the
// button, every wrap and reset; then random switch/button patterns are
// compared with the model on every clk_1s edge.
`timescale 1ns/1ps
module time_input_tb;
  import alarm_clock_pkg::*;

  logic clk_1s = 1'b0;
  logic reset, increment_button;
  logic switch_Hin1, switch_Hin0, switch_Min1, switch_Min0;
  bcd_t H_in1, H_in0, M_in1, M_in0;
  int   checks = 0, failures = 0;
  int   rh1, rh0, rm1, rm0;
  int   wraps = 0;

  time_input dut (.*);

  always #500 clk_1s = ~clk_1s;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic ref_step();
    int lim0;
    if (!increment_button) return;
    lim0 = (rh1 == 2) ? 3 : 9;
    if (switch_Hin1) begin rh1 = (rh1 >= 2) ? 0 : rh1 + 1; if (rh1 == 0) wraps++; end
    if (switch_Hin0) begin rh0 = (rh0 >= lim0) ? 0 : rh0 + 1; if (rh0 == 0) wraps++; end
    if (rh1 == 2 && rh0 > 3) rh0 = 0;
    if (switch_Min1) begin rm1 = (rm1 >= 5) ? 0 : rm1 + 1; if (rm1 == 0) wraps++; end
    if (switch_Min0) begin rm0 = (rm0 >= 9) ? 0 : rm0 + 1; if (rm0 == 0) wraps++; end
  endtask

  task automatic compare(input string when);
    check(H_in1 == rh1 && H_in0 == rh0 && M_in1 == rm1 && M_in0 == rm0,
          $sformatf("%s: got %0d%0d:%0d%0d expected %0d%0d:%0d%0d", when,
                    H_in1, H_in0, M_in1, M_in0, rh1, rh0, rm1, rm0));
  endtask

  // Apply one second of inputs, then check after the clk_1s edge.
  task automatic second(input logic btn, input logic [3:0] sw);
    @(negedge clk_1s);
    increment_button = btn;
    {switch_Hin1, switch_Hin0, switch_Min1, switch_Min0} = sw;
    @(posedge clk_1s);
    ref_step();
    #1 compare("step");
  endtask

  initial begin
    reset = 1'b1;
    increment_button = 1'b0;
    {switch_Hin1, switch_Hin0, switch_Min1, switch_Min0} = '0;
    rh1 = 0; rh0 = 0; rm1 = 0; rm0 = 0;
    repeat (2) @(posedge clk_1s);
    #1 compare("in reset");
    #1 reset = 1'b0;

    // Minute units: one press, then hold across the 9 -> 0 wrap.
    second(1'b1, 4'b0001);
    check(M_in0 == 4'd1, "one press steps M_in0 to 1");
    second(1'b0, 4'b0001);
    check(M_in0 == 4'd1, "no press, no step");
    repeat (9) second(1'b1, 4'b0001);
    check(M_in0 == 4'd0, "M_in0 wraps after 9");
    // Minute tens wrap after 5.
    repeat (6) second(1'b1, 4'b0010);
    check(M_in1 == 4'd0, "M_in1 wraps after 5");
    // Hour tens wraps after 2, hour units after 9, or after 3 with tens 2.
    repeat (3) second(1'b1, 4'b1000);
    check(H_in1 == 4'd0, "H_in1 wraps after 2");
    repeat (10) second(1'b1, 4'b0100);
    check(H_in0 == 4'd0, "H_in0 wraps after 9");
    repeat (2) second(1'b1, 4'b1000);
    repeat (3) second(1'b1, 4'b0100);
    check(H_in1 == 4'd2 && H_in0 == 4'd3, "hour entered as 23");
    second(1'b1, 4'b0100);
    check(H_in0 == 4'd0, "H_in0 wraps after 3 when H_in1 is 2");
    // Hour 19 with the tens stepped to 2 becomes 20, never 29.
    repeat (2) second(1'b1, 4'b1000);
    repeat (9) second(1'b1, 4'b0100);
    check(H_in1 == 4'd1 && H_in0 == 4'd9, "hour entered as 19");
    second(1'b1, 4'b1000);
    check(H_in1 == 4'd2 && H_in0 == 4'd0, "19 with tens stepped becomes 20");
    // Selected switch but no press does nothing.
    repeat (3) second(1'b0, 4'b1111);

    // Random patterns.
    repeat (2000) second(1'($urandom_range(0, 1)), 4'($urandom));

    // Asynchronous reset.
    @(negedge clk_1s);
    #100 reset = 1'b1;
    #1;
    rh1 = 0; rh0 = 0; rm1 = 0; rm0 = 0;
    compare("asynchronous reset");
    check(wraps > 10, "wraps exercised");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk_1s);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
