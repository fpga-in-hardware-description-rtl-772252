// clock_division_tb -- checks the 50 MHz to 1 Hz divider.
//
// Two dividers run side by side: one with HALF_PERIOD = 5 for many periods,
// and one at the default of 25,000,000 for one full 1 Hz period. For both,
// the testbench counts 50 MHz cycles from reset release to each edge of
// clk_1s and expects exactly HALF_PERIOD cycles between consecutive edges
// (so a 1 s period at 50 MHz), and a low clk_1s right after reset.
`timescale 1ns/1ps
module clock_division_tb;

  localparam int unsigned SMALL = 5;
  localparam int unsigned FULL  = 25_000_000;

  logic clk = 1'b0;
  logic reset;
  logic clk_small, clk_full;
  int   checks = 0, failures = 0;

  always #10 clk = ~clk;   // 50 MHz

  clock_division #(.HALF_PERIOD(SMALL)) u_small (.clk_50MHz(clk), .reset, .clk_1s(clk_small));
  clock_division                        u_full  (.clk_50MHz(clk), .reset, .clk_1s(clk_full));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Cycle counter since reset release, and edge bookkeeping for both dividers.
  longint cyc = 0;
  logic   prev_small = 1'b0, prev_full = 1'b0;
  longint last_small = 0;
  int     small_edges = 0, full_edges = 0;

  always @(posedge clk) begin
    if (!reset) begin
      cyc <= cyc + 1;
      if (clk_small != prev_small) begin
        check(cyc - last_small == SMALL,
              $sformatf("small divider edge after %0d cycles, expected %0d", cyc - last_small, SMALL));
        last_small = cyc;
        small_edges++;
      end
      if (clk_full != prev_full) begin
        full_edges++;
        check(cyc == longint'(FULL) * full_edges,
              $sformatf("full divider edge %0d at cycle %0d, expected %0d", full_edges, cyc, longint'(FULL) * full_edges));
        check(clk_full == (full_edges % 2 == 1), "full divider rises first");
      end
      prev_small = clk_small;
      prev_full  = clk_full;
    end
  end

  initial begin
    reset = 1'b1;
    repeat (3) @(posedge clk);
    #1;
    check(clk_small == 1'b0 && clk_full == 1'b0, "clk_1s low in reset");
    reset = 1'b0;
    wait (full_edges == 2);
    repeat (3) @(posedge clk);
    check(small_edges == 2 * FULL / SMALL, $sformatf("small divider made %0d edges", small_edges));
    // Reset in the middle of a period clears the divider again.
    #3 reset = 1'b1;
    #5;
    check(clk_small == 1'b0 && clk_full == 1'b0, "asynchronous reset clears clk_1s");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (2 * FULL + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
