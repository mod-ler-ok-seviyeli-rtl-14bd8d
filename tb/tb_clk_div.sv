// tb_clk_div: checks the sine sampling clock divider.
// Two instances run side by side: the full-size one (HALF_COUNT = 2500, a
// 50 us sample period at 100 MHz) and a small one (HALF_COUNT = 3). For each,
// the testbench checks that clk_out toggles every HALF_COUNT cycles, that
// sample_tick is a single-cycle pulse once per 2*HALF_COUNT cycles, that the
// first tick comes HALF_COUNT cycles after reset release, and that it
// coincides with clk_out having just risen.
module tb_clk_div;
  timeunit 1ns;
  timeprecision 100ps;
  localparam int unsigned HALF_BIG   = 2500;
  localparam int unsigned HALF_SMALL = 3;
  localparam int unsigned RUN_CYCLES = 8 * HALF_BIG + 10;

  logic clk = 1'b0;
  logic rst = 1'b1;
  int   checks = 0, failures = 0;
  int   cycle = 0;

  logic clk_b, tick_b, clk_s, tick_s;

  clk_div #(.HALF_COUNT(HALF_BIG))   u_big   (.clk, .rst, .clk_out(clk_b), .sample_tick(tick_b));
  clk_div #(.HALF_COUNT(HALF_SMALL)) u_small (.clk, .rst, .clk_out(clk_s), .sample_tick(tick_s));

  always #5 clk = ~clk;   // 100 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  // Reference: cycle counts since reset release, computed independently.
  int last_tick_b = -1, last_tick_s = -1;
  int last_tog_b = 0, last_tog_s = 0;
  logic prev_clk_b = 1'b0, prev_clk_s = 1'b0;
  int ticks_b = 0, ticks_s = 0;

  always @(posedge clk) begin
    if (!rst) begin
      cycle <= cycle + 1;
      if (tick_b) begin
        ticks_b++;
        if (last_tick_b < 0) check(cycle == int'(HALF_BIG), $sformatf("first big tick at %0d", cycle));
        else                 check(cycle - last_tick_b == 2 * int'(HALF_BIG), "big tick period");
        check(clk_b == 1'b1, "big tick while clk_out high");
        last_tick_b = cycle;
      end
      if (tick_s) begin
        ticks_s++;
        if (last_tick_s < 0) check(cycle == int'(HALF_SMALL), $sformatf("first small tick at %0d", cycle));
        else                 check(cycle - last_tick_s == 2 * int'(HALF_SMALL), "small tick period");
        check(clk_s == 1'b1, "small tick while clk_out high");
        last_tick_s = cycle;
      end
      if (clk_b != prev_clk_b) begin
        check(cycle - last_tog_b == int'(HALF_BIG), "big clk_out half period");
        last_tog_b = cycle;
      end
      if (clk_s != prev_clk_s) begin
        check(cycle - last_tog_s == int'(HALF_SMALL), "small clk_out half period");
        last_tog_s = cycle;
      end
      prev_clk_b = clk_b;
      prev_clk_s = clk_s;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    repeat (RUN_CYCLES) @(posedge clk);
    check(ticks_b == 4, $sformatf("big ticks %0d", ticks_b));
    check(ticks_s == int'(RUN_CYCLES) / (2 * int'(HALF_SMALL)), $sformatf("small ticks %0d", ticks_s));
    // Asynchronous reset clears the divided clock at once.
    #1 rst = 1'b1;
    #1 check(clk_b == 1'b0 && clk_s == 1'b0 && !tick_b && !tick_s, "reset clears outputs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (RUN_CYCLES + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
