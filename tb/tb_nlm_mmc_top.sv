// tb_nlm_mmc_top: end-to-end test of the gate controller at reduced timing.
// Five copies of the top run side by side with the k-terms 92, 82, 72, 62
// (M = 0.9 .. 0.6) and 0 (N held at 2); the sample period is shortened to
// 2*20 cycles and the dead time to 3 cycles so that a little more than two
// sine periods take about 35,000 cycles. Each copy is watched by mmc_monitor,
// which models the converter arms and checks every sample and every dead time.
// The testbench then checks the number of output levels (5, 5, 3, 3, 1 as
// the measurements in the description show), the output RMS voltage against
// that of an exactly rounded staircase (and loosely against M * 20 V / sqrt(2)), and that each mechanism happened: level changes, dead
// times, a wrap of the sine table and a reset in mid-operation.
module tb_nlm_mmc_top;
  timeunit 1ns;
  timeprecision 100ps;
  localparam int HALF = 20;
  localparam int D    = 3;
  localparam int SAMPLES_RUN = 2 * 400 + 20;
  localparam int NK = 5;
  localparam int KS [NK] = '{92, 82, 72, 62, 0};
  localparam int LEVELS [NK] = '{5, 5, 3, 3, 1};

  logic clk = 1'b0, rst = 1'b1;
  int checks = 0, failures = 0;
  int resets_mid = 0;
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [3:0] up_s1 [NK], up_s2 [NK], lo_s1 [NK], lo_s2 [NK];

  for (genvar g = 0; g < NK; g++) begin : g_dut
    nlm_mmc_top #(.HALF_COUNT(HALF), .K_TERM(KS[g]), .DEAD_CYCLES(D)) dut (
      .clk, .rst, .upper_s1(up_s1[g]), .upper_s2(up_s2[g]), .lower_s1(lo_s1[g]), .lower_s2(lo_s2[g])
    );
    mmc_monitor #(.K(KS[g]), .D(D), .HALF(HALF)) mon (
      .clk, .rst, .tick(dut.sample_tick),
      .up_s1(up_s1[g]), .up_s2(up_s2[g]), .lo_s1(lo_s1[g]), .lo_s2(lo_s2[g])
    );
  end

  int tot_checks, tot_fail, lv [NK], chg [NK], wr [NK], dg [NK], ex [NK], sm [NK];
  real rms [NK], rref [NK];

  initial begin
    // Short first run, then reset in mid-operation and run again.
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    repeat (HALF * 2 * 37 + 7) @(posedge clk);
    #1 rst = 1'b1;
    resets_mid++;
    repeat (2) @(posedge clk);
    // the monitors restart their per-period state during this reset
    #1 rst = 1'b0;
    repeat (HALF * 2 * SAMPLES_RUN) @(posedge clk);
    #1;
    lv[0] = g_dut[0].mon.levels_seen(); lv[1] = g_dut[1].mon.levels_seen();
    lv[2] = g_dut[2].mon.levels_seen(); lv[3] = g_dut[3].mon.levels_seen();
    lv[4] = g_dut[4].mon.levels_seen();
    rms[0] = g_dut[0].mon.vrms(); rms[1] = g_dut[1].mon.vrms(); rms[2] = g_dut[2].mon.vrms();
    rms[3] = g_dut[3].mon.vrms(); rms[4] = g_dut[4].mon.vrms();
    rref[0] = g_dut[0].mon.vrms_ref(); rref[1] = g_dut[1].mon.vrms_ref(); rref[2] = g_dut[2].mon.vrms_ref();
    rref[3] = g_dut[3].mon.vrms_ref(); rref[4] = g_dut[4].mon.vrms_ref();
    chg[0] = g_dut[0].mon.level_changes; chg[1] = g_dut[1].mon.level_changes;
    chg[2] = g_dut[2].mon.level_changes; chg[3] = g_dut[3].mon.level_changes;
    chg[4] = g_dut[4].mon.level_changes;
    wr[0] = g_dut[0].mon.wraps; wr[1] = g_dut[1].mon.wraps; wr[2] = g_dut[2].mon.wraps;
    wr[3] = g_dut[3].mon.wraps; wr[4] = g_dut[4].mon.wraps;
    dg[0] = g_dut[0].mon.dead_gaps; dg[1] = g_dut[1].mon.dead_gaps; dg[2] = g_dut[2].mon.dead_gaps;
    dg[3] = g_dut[3].mon.dead_gaps; dg[4] = g_dut[4].mon.dead_gaps;
    ex[0] = g_dut[0].mon.exact; ex[1] = g_dut[1].mon.exact; ex[2] = g_dut[2].mon.exact;
    ex[3] = g_dut[3].mon.exact; ex[4] = g_dut[4].mon.exact;
    sm[0] = g_dut[0].mon.samples; sm[1] = g_dut[1].mon.samples; sm[2] = g_dut[2].mon.samples;
    sm[3] = g_dut[3].mon.samples; sm[4] = g_dut[4].mon.samples;
    tot_checks = g_dut[0].mon.checks + g_dut[1].mon.checks + g_dut[2].mon.checks
               + g_dut[3].mon.checks + g_dut[4].mon.checks;
    tot_fail   = g_dut[0].mon.failures + g_dut[1].mon.failures + g_dut[2].mon.failures
               + g_dut[3].mon.failures + g_dut[4].mon.failures;
    checks += tot_checks;
    failures += tot_fail;
    for (int g = 0; g < NK; g++) begin
      real ideal;
      ideal = (KS[g] * 10.0 / 1024.0) * 20.0 / $sqrt(2.0);
      $display("k=%0d: samples %0d, levels %0d, level changes %0d, dead times %0d, table wraps %0d, Vrms %.2f V (rounded reference %.2f V, pure sine %.2f V)",
               KS[g], sm[g], lv[g], chg[g], dg[g], wr[g], rms[g], rref[g], ideal);
      check(lv[g] == LEVELS[g], $sformatf("k=%0d output levels %0d", KS[g], lv[g]));
      check(sm[g] >= SAMPLES_RUN, $sformatf("k=%0d samples %0d", KS[g], sm[g]));
      check(ex[g] * 100 >= (sm[g] - 1) * 99, "levels match exact rounding");
      if (KS[g] != 0) begin
        check(rms[g] > 0.99 * rref[g] && rms[g] < 1.01 * rref[g], $sformatf("k=%0d Vrms %.2f", KS[g], rms[g]));
        check(rms[g] > 0.75 * ideal && rms[g] < 1.25 * ideal, "staircase near the sine");
        check(chg[g] > 0, "level changes happened");
        check(dg[g] > 0, "dead times inserted");
      end else begin
        check(chg[g] == 0 && dg[g] == 0, "k=0 holds N = 2 with no switching");
      end
      check(wr[g] >= 1, "sine table wrapped");
    end
    check(resets_mid == 1, "reset in mid-operation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (HALF * 2 * (SAMPLES_RUN + 100)) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + tot_checks, failures);
    $finish;
  end
endmodule
