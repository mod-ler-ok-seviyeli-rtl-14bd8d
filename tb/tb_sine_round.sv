// tb_sine_round: checks the sine reference and nearest-level rounding.
// Sample ticks are driven with random spacing. For each tick the testbench
// works out the expected number of inserted upper-arm submodules from its
// own real-valued sine: round(2*(1 - M*sin(2*pi*i/400))) with M = k*10/1024,
// clamped to 0..4, and checks n_upper, n_lower = 4 - n_upper, the table index,
// and that the levels and level_valid appear exactly one cycle after the
// tick. It runs more than one full period for each k-term of the
// description's table (92, 82, 72, 62), for k = 0 (constant N = 2) and for
// k = 127 (over-modulation, clamped), and counts the distinct levels seen.
module tb_sine_round;
  timeunit 1ns;
  timeprecision 100ps;
  import nlm_pkg::*;

  logic   clk = 1'b0;
  logic   rst = 1'b1;
  logic   sample_tick = 1'b0;
  kterm_t k_term = '0;
  level_t n_upper, n_lower;
  logic [ADDR_W-1:0] sample_addr;
  logic   level_valid;
  int checks = 0, failures = 0;

  sine_round dut (.clk, .rst, .sample_tick, .k_term, .n_upper, .n_lower, .sample_addr, .level_valid);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // Independent reference in real arithmetic. The design's integer path
  // differs from it only by sub-LSB rounding of the sine, so a level is
  // accepted if the exact value lies within 0.5 (+ small margin) of it.
  function automatic bit level_ok(input int idx, input int k, input int got);
    real m, x;
    m = k * 10.0 / 1024.0;
    x = 2.0 * (1.0 - m * $sin(2.0 * 3.14159265358979323846 * idx / 400.0));
    if (x < 0.0) x = 0.0;
    if (x > 4.0) x = 4.0;
    return (got - x <= 0.5 + 0.004) && (x - got <= 0.5 + 0.004);
  endfunction

  function automatic int exact_level(input int idx, input int k);
    real m, x;
    m = k * 10.0 / 1024.0;
    x = 2.0 * (1.0 - m * $sin(2.0 * 3.14159265358979323846 * idx / 400.0));
    if (x < 0.0) x = 0.0;
    if (x > 4.0) x = 4.0;
    return int'($floor(x + 0.5));
  endfunction

  int exact_matches, samples_total;

  task automatic run_k(input int k, input int n_samples, input int expect_levels);
    bit seen [5];
    int nlev;
    int idx;
    rst = 1'b1;
    k_term = K_W'(k);
    @(posedge clk); #1;
    check(n_upper == 2 && n_lower == 2 && !level_valid, "reset levels");
    rst = 1'b0;
    foreach (seen[j]) seen[j] = 1'b0;
    idx = 0;
    for (int s = 0; s < n_samples; s++) begin
      repeat ($urandom_range(4, 0)) @(posedge clk);
      #1 sample_tick = 1'b1;
      @(posedge clk); #1 sample_tick = 1'b0;
      check(level_valid, "level_valid one cycle after tick");
      check(int'(sample_addr) == idx, $sformatf("k=%0d sample %0d addr %0d", k, s, sample_addr));
      check(level_ok(idx, k, int'(n_upper)),
            $sformatf("k=%0d idx=%0d n_upper=%0d", k, idx, n_upper));
      check(int'(n_lower) == 4 - int'(n_upper), "n_lower = 4 - n_upper");
      samples_total++;
      if (int'(n_upper) == exact_level(idx, k)) exact_matches++;
      seen[n_upper] = 1'b1;
      @(posedge clk); #1;
      check(!level_valid, "level_valid is one cycle");
      idx = (idx + 1) % 400;
    end
    nlev = 0;
    foreach (seen[j]) nlev += int'(seen[j]);
    check(nlev == expect_levels, $sformatf("k=%0d levels seen %0d, expected %0d", k, nlev, expect_levels));
    $display("k=%0d: %0d distinct upper-arm levels", k, nlev);
  endtask

  initial begin
    exact_matches = 0;
    samples_total = 0;
    repeat (2) @(posedge clk);
    run_k(92, 450, 5);   // M = 0.9: five levels
    run_k(82, 400, 5);   // M = 0.8: five levels
    run_k(72, 400, 3);   // M = 0.7: three levels
    run_k(62, 400, 3);   // M = 0.6: three levels
    run_k(0,  50,  1);   // M = 0: N stays 2
    run_k(127, 400, 5);  // over-modulation: clamped to 0..4
    // The integer path should agree with exact rounding on nearly every sample.
    check(exact_matches * 100 >= samples_total * 99,
          $sformatf("exact rounding on %0d of %0d samples", exact_matches, samples_total));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
