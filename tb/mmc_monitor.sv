// mmc_monitor: testbench-side checker and converter model for the gate
// pulses of one nlm_mmc_top instance.
//
// It models each arm as a string of four 10 V half-bridge submodules: the arm
// voltage is 10 V times the number of submodules whose S1 is on, and the AC
// output is (v_lower - v_upper)/2. At every sample strobe it checks, against
// levels it computes itself from a real-valued sine (round(2*(1 - M sin)),
// M = K*10/1024), that the upper arm inserts the level of the previous sample,
// the lower arm the complement, and every submodule has exactly one switch on.
// On every cycle it checks that no submodule has both switches on, and it
// measures every dead time (one switch off until the other on) against D.
// It counts: samples, level changes, table wraps, dead times, distinct levels,
// and accumulates the output voltage over the first full period for its RMS,
// along with the RMS of the ideally rounded staircase.
module mmc_monitor #(
  parameter int K    = 92,
  parameter int D    = 20,
  parameter int HALF = 2500
) (
  input logic       clk,
  input logic       rst,
  input logic       tick,
  input logic [3:0] up_s1,
  input logic [3:0] up_s2,
  input logic [3:0] lo_s1,
  input logic [3:0] lo_s2
);
  timeunit 1ns;
  timeprecision 100ps;
  int checks = 0, failures = 0;
  int samples = 0, level_changes = 0, wraps = 0, dead_gaps = 0, exact = 0;
  int last_tick_cycle = -1, cycle = 0;
  int prev_level = 2;
  bit seen [5] = '{default: 1'b0};
  real v2_sum = 0.0;
  int  v2_n = 0;
  int  fall_cycle [8] = '{default: 0};
  logic [7:0] p_s1 = '0, p_s2 = '0;
  bit  rst_seen = 1'b0;
  real v2_ref = 0.0;

  function automatic real level_real(input int j);
    real x;
    x = 2.0 * (1.0 - (K * 10.0 / 1024.0) * $sin(2.0 * 3.14159265358979323846 * (j % 400) / 400.0));
    if (x < 0.0) x = 0.0;
    if (x > 4.0) x = 4.0;
    return x;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL K=%0d @%0t: %s", K, $time, what);
    end
  endtask

  function automatic int popcount4(input logic [3:0] v);
    return int'(v[0]) + int'(v[1]) + int'(v[2]) + int'(v[3]);
  endfunction

  always @(posedge clk) begin
    if (rst) begin
      // from the second reset cycle on (the first edge is the one that resets)
      if (rst_seen)
        check(up_s1 == '0 && up_s2 == '0 && lo_s1 == '0 && lo_s2 == '0, "all gates open in reset");
      rst_seen = 1'b1;
      v2_ref = 0.0;
      // a reset restarts the sine period: restart the per-period state
      cycle = 0;
      samples = 0;
      last_tick_cycle = -1;
      prev_level = 2;
      p_s1 = '0;
      p_s2 = '0;
      v2_sum = 0.0;
      v2_n = 0;
      exact = 0;
      foreach (seen[j]) seen[j] = 1'b0;
    end else begin
      logic [7:0] s1, s2;
      cycle++;
      s1 = {lo_s1, up_s1};
      s2 = {lo_s2, up_s2};
      check((s1 & s2) == '0, "no submodule has both switches on");
      for (int i = 0; i < 8; i++) begin
        if ((p_s1[i] && !s1[i]) || (p_s2[i] && !s2[i])) fall_cycle[i] = cycle;
        if ((!p_s1[i] && s1[i]) || (!p_s2[i] && s2[i])) begin
          if (cycle > D + 1) begin   // not the first turn-on after reset
            check(cycle - fall_cycle[i] == D, $sformatf("SM%0d dead time %0d", i, cycle - fall_cycle[i]));
            dead_gaps++;
          end
        end
      end
      p_s1 = s1;
      p_s2 = s2;
      if (tick) begin
        int n_up, n_lo, expect_prev;
        real x;
        if (last_tick_cycle >= 0)
          check(cycle - last_tick_cycle == 2 * HALF, "sample period");
        last_tick_cycle = cycle;
        n_up = popcount4(up_s1);
        n_lo = popcount4(lo_s1);
        check((s1 ^ s2) == 8'hFF, "every submodule has one switch on at the sample instant");
        check(n_up + n_lo == 4, $sformatf("arms insert %0d + %0d submodules", n_up, n_lo));
        // inserted submodules are the lowest-numbered ones
        check(up_s1 == 4'((1 << n_up) - 1) && lo_s1 == 4'((1 << n_lo) - 1), "submodule order");
        if (samples == 0) begin
          check(n_up == 2, "reset level before first sample");
        end else begin
          x = level_real(samples - 1);
          check((n_up - x <= 0.504) && (x - n_up <= 0.504),
                $sformatf("sample %0d upper level %0d, exact %f", samples - 1, n_up, x));
          if (n_up == int'($floor(x + 0.5))) exact++;
          if (n_up != prev_level) level_changes++;
          if ((samples - 1) % 400 == 0 && samples > 1) wraps++;
          seen[n_up] = 1'b1;
          if (samples <= 400) begin
            v2_sum += (real'(n_lo - n_up) * 5.0) ** 2;
            v2_ref += ((4.0 - 2.0 * $floor(x + 0.5)) * 5.0) ** 2;
            v2_n++;
          end
        end
        prev_level = n_up;
        samples++;
      end
    end
  end

  function automatic int levels_seen();
    int n = 0;
    foreach (seen[j]) n += int'(seen[j]);
    return n;
  endfunction

  // RMS of the staircase that exact rounding of the sine would give
  function automatic real vrms_ref();
    return (v2_n > 0) ? $sqrt(v2_ref / v2_n) : 0.0;
  endfunction

  function automatic real vrms();
    return (v2_n > 0) ? $sqrt(v2_sum / v2_n) : 0.0;
  endfunction
endmodule
