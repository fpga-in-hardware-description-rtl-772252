// clock_output_tb -- checks the binary to BCD split of the clock time.
//
// Every hour 0..23 and every minute/second 0..59 is applied. The expected
// tens digit is found by counting how many times 10 can be taken away, so
// the reference does not share the design's division.
`timescale 1ns/1ps
module clock_output_tb;
  import alarm_clock_pkg::*;

  hour_t   tmp_hour;
  minsec_t tmp_minute, tmp_second;
  bcd_t    H_out1, H_out0, M_out1, M_out0, S_out1, S_out0;
  int      checks = 0, failures = 0;

  clock_output dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic void split(input int v, output int tens, output int units);
    tens = 0;
    units = v;
    while (units >= 10) begin
      units -= 10;
      tens++;
    end
  endfunction

  initial begin
    int t, u, t2, u2;
    for (int v = 0; v < 60; v++) begin
      tmp_hour   = hour_t'(v % 24);
      tmp_minute = minsec_t'(v);
      tmp_second = minsec_t'(59 - v);
      #1;
      split(v % 24, t, u);
      check(H_out1 == t && H_out0 == u, $sformatf("hour %0d -> %0d%0d", v % 24, H_out1, H_out0));
      split(v, t, u);
      check(M_out1 == t && M_out0 == u, $sformatf("minute %0d -> %0d%0d", v, M_out1, M_out0));
      split(59 - v, t2, u2);
      check(S_out1 == t2 && S_out0 == u2, $sformatf("second %0d -> %0d%0d", 59 - v, S_out1, S_out0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
