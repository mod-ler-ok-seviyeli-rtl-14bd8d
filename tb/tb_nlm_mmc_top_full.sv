// tb_nlm_mmc_top_full: one complete 20 ms fundamental period of the gate
// controller at its full size: 100 MHz clock, 2500-cycle half sample period
// (400 samples of 50 us), k-term 92 (M = 0.9) and a 20-cycle (200 ns) dead
// time, all at the top's defaults. mmc_monitor models the arms and checks
// every sample and every dead time; the testbench then checks five output
// levels and eight level changes per period (2-1-0-1-2-3-4-3-2), the 50 Hz
// period (the sine table wraps after exactly 2,000,000
// cycles), and the output RMS voltage against the exactly rounded staircase.
module tb_nlm_mmc_top_full;
  timeunit 1ns;
  timeprecision 100ps;

  localparam int HALF = 2500;
  localparam int SAMPLES_RUN = 400 + 2;

  logic clk = 1'b0, rst = 1'b1;
  logic [3:0] up_s1, up_s2, lo_s1, lo_s2;
  int checks = 0, failures = 0;
  int wrap_cycle = -1, first_cycle = -1, cyc = 0;
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  nlm_mmc_top dut (.clk, .rst, .upper_s1(up_s1), .upper_s2(up_s2), .lower_s1(lo_s1), .lower_s2(lo_s2));

  mmc_monitor #(.K(92), .D(20), .HALF(HALF)) mon (
    .clk, .rst, .tick(dut.sample_tick), .up_s1, .up_s2, .lo_s1, .lo_s2
  );

  // time of the samples taken from table entry 0
  always @(posedge clk) begin
    if (!rst) begin
      cyc++;
      if (dut.level_valid && dut.sample_addr == '0) begin
        if (first_cycle < 0) first_cycle = cyc;
        else if (wrap_cycle < 0) wrap_cycle = cyc;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    repeat (2 * HALF * SAMPLES_RUN) @(posedge clk);
    #1;
    $display("samples %0d, levels %0d, level changes %0d, dead times %0d, Vrms %.2f V (rounded reference %.2f V)",
             mon.samples, mon.levels_seen(), mon.level_changes, mon.dead_gaps, mon.vrms(), mon.vrms_ref());
    $display("fundamental period %0d cycles", wrap_cycle - first_cycle);
    checks += mon.checks;
    failures += mon.failures;
    check(mon.levels_seen() == 5, "five output levels at M = 0.9");
    check(wrap_cycle - first_cycle == 2_000_000, "20 ms fundamental period");
    check(mon.level_changes == 8, $sformatf("level changes per period %0d", mon.level_changes));
    check(mon.dead_gaps > 0, "dead times inserted");
    check(mon.vrms() > 0.99 * mon.vrms_ref() && mon.vrms() < 1.01 * mon.vrms_ref(), "output RMS");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (2 * HALF * (SAMPLES_RUN + 20)) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
