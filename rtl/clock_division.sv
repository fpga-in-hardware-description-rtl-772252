// clock_division -- divides the 50 MHz board clock down to the 1 Hz clk_1s.
//
// A counter runs on clk_50MHz from 0 to HALF_PERIOD-1 and returns to 0; each
// time it wraps, clk_1s toggles. With the default HALF_PERIOD of 25,000,000
// each half of clk_1s lasts 0.5 s, so clk_1s has a 1 s period and 50 % duty.
// The count of 25,000,000 per half period follows the design; reading it as
// "wrap after HALF_PERIOD cycles" (not HALF_PERIOD+1) is this design's choice.
//
// clk_1s is a register output that the rest of the clock uses as its clock,
// as in the original design.
// reset is asynchronous and active high: it clears the counter and clk_1s.
// Timing: the first rising edge of clk_1s comes HALF_PERIOD cycles of
// clk_50MHz after reset is released, then one every 2*HALF_PERIOD cycles.
module clock_division #(
  parameter int unsigned HALF_PERIOD = 25_000_000
) (
  input  logic clk_50MHz,
  input  logic reset,
  output logic clk_1s
);

  localparam int unsigned CW = (HALF_PERIOD > 1) ? $clog2(HALF_PERIOD) : 1;
  localparam logic [CW-1:0] LAST = CW'(HALF_PERIOD - 1);

  logic [CW-1:0] count;

  always_ff @(posedge clk_50MHz or posedge reset) begin
    if (reset) begin
      count  <= '0;
      clk_1s <= 1'b0;
    end else if (count == LAST) begin
      count  <= '0;
      clk_1s <= ~clk_1s;
    end else begin
      count  <= count + 1'b1;
    end
  end

endmodule
