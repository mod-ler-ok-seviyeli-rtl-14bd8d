// clk_div: derives the sine sampling clock from the 100 MHz master clock.
//
// A counter counts master-clock rising edges; after HALF_COUNT of them the
// divided clock clk_out toggles and the counter restarts, so clk_out has a
// period of 2*HALF_COUNT master cycles. With HALF_COUNT = 2500 this is 50 us,
// i.e. 400 samples per 20 ms (50 Hz) sine period, as the description derives.
// The rest of the design runs on the master clock and uses sample_tick, a
// one-master-cycle strobe that is high in the cycle after clk_out rises,
// rather than clocking logic from clk_out (this design's choice: it keeps one
// clock domain). clk_out itself is still provided.
//
// Timing: after reset is released, clk_out first rises and sample_tick first
// pulses HALF_COUNT cycles later, then every 2*HALF_COUNT cycles.
// Reset (asynchronous, active high) clears the counter and clk_out.
module clk_div #(
  parameter int unsigned HALF_COUNT = 2500   // master edges per half period
) (
  input  logic clk,
  input  logic rst,
  output logic clk_out,
  output logic sample_tick
);

  localparam int unsigned CNT_W = (HALF_COUNT > 1) ? $clog2(HALF_COUNT) : 1;

  logic [CNT_W-1:0] cnt;
  logic             wrap;

  assign wrap = (cnt == CNT_W'(HALF_COUNT - 1));

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      cnt         <= '0;
      clk_out     <= 1'b0;
      sample_tick <= 1'b0;
    end else begin
      cnt         <= wrap ? '0 : cnt + 1'b1;
      if (wrap) clk_out <= ~clk_out;
      sample_tick <= wrap & ~clk_out;   // divided clock is about to rise
    end
  end

endmodule
