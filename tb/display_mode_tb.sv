// display_mode_tb -- checks mode selection and the seven-segment outputs.
//
// Random digits for the clock, alarm and entered time and random mode
// switches are applied; one clk_50MHz edge later every display is compared
// with what the reference expects: mode letter on HEX0 (C, A, E), digits on
// HEX7..HEX2 from the selected time, blank seconds in entry mode, and all
// blank with no switch on. The reference patterns come from clock_tb_pkg.
// Each mode is counted and must occur.
`timescale 1ns/1ps
module display_mode_tb;
  import alarm_clock_pkg::*;
  import clock_tb_pkg::*;

  logic clk_50MHz = 1'b0;
  logic ctime, atime, stime;
  bcd_t H_out1, H_out0, M_out1, M_out0, S_out1, S_out0;
  bcd_t H_in1, H_in0, M_in1, M_in0;
  bcd_t a_hour1, a_hour0, a_min1, a_min0, a_sec1, a_sec0;
  seg_t HEX0, HEX2, HEX3, HEX4, HEX5, HEX6, HEX7;
  int   checks = 0, failures = 0;
  int   seen[4] = '{0, 0, 0, 0};   // blank, clock, alarm, entry

  display_mode dut (.*);

  always #10 clk_50MHz = ~clk_50MHz;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [6:0] d(input bcd_t v);
    return REF_DIGIT[v];
  endfunction

  initial begin
    logic [6:0] e0, e2, e3, e4, e5, e6, e7;
    repeat (3000) begin
      @(negedge clk_50MHz);
      {ctime, atime, stime} = 3'($urandom);
      {H_out1, H_out0, M_out1, M_out0, S_out1, S_out0} =
        {4'($urandom_range(0, 9)), 4'($urandom_range(0, 9)), 4'($urandom_range(0, 9)),
         4'($urandom_range(0, 9)), 4'($urandom_range(0, 9)), 4'($urandom_range(0, 9))};
      {H_in1, H_in0, M_in1, M_in0} =
        {4'($urandom_range(0, 9)), 4'($urandom_range(0, 9)), 4'($urandom_range(0, 9)),
         4'($urandom_range(0, 9))};
      {a_hour1, a_hour0, a_min1, a_min0, a_sec1, a_sec0} =
        {4'($urandom_range(0, 9)), 4'($urandom_range(0, 9)), 4'($urandom_range(0, 9)),
         4'($urandom_range(0, 9)), 4'($urandom_range(0, 9)), 4'($urandom_range(0, 9))};
      if (ctime) begin
        seen[1]++;
        {e0, e2, e3, e4, e5, e6, e7} = {REF_C, d(S_out0), d(S_out1), d(M_out0), d(M_out1), d(H_out0), d(H_out1)};
      end else if (atime) begin
        seen[2]++;
        {e0, e2, e3, e4, e5, e6, e7} = {REF_A, d(a_sec0), d(a_sec1), d(a_min0), d(a_min1), d(a_hour0), d(a_hour1)};
      end else if (stime) begin
        seen[3]++;
        {e0, e2, e3, e4, e5, e6, e7} = {REF_E, REF_BLANK, REF_BLANK, d(M_in0), d(M_in1), d(H_in0), d(H_in1)};
      end else begin
        seen[0]++;
        {e0, e2, e3, e4, e5, e6, e7} = {7{REF_BLANK}};
      end
      @(posedge clk_50MHz);
      #1;
      check({HEX0, HEX2, HEX3, HEX4, HEX5, HEX6, HEX7} == {e0, e2, e3, e4, e5, e6, e7},
            $sformatf("mode c%0b a%0b s%0b: HEX0=%b HEX2..7=%b %b %b %b %b %b", ctime, atime, stime,
                      HEX0, HEX2, HEX3, HEX4, HEX5, HEX6, HEX7));
    end
    foreach (seen[i]) check(seen[i] > 0, $sformatf("mode %0d never applied", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (10000) @(posedge clk_50MHz);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
