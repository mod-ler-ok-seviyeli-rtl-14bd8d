// tb_dead_time: checks the dead-time generator at its full size (20 cycles,
// 200 ns at 100 MHz) and at 3 cycles. Complementary commands change at random
// intervals, some shorter than the dead time; both-on and both-off commands
// are mixed in. A cycle-accurate reference model written here predicts each
// output; the testbench also checks directly that S1 and S2 are never on
// together and that every turn-on follows the partner's turn-off by exactly
// at least the dead time (exactly it when the command flips directly from
// one switch to the other), and counts those exact dead times.
module tb_dead_time;
  timeunit 1ns;
  timeprecision 100ps;
  import nlm_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  gate_pair_t cmd = GATE_IDLE;
  gate_pair_t gate20, gate3;
  int checks = 0, failures = 0;
  int gaps20 = 0, gaps3 = 0;

  dead_time                   dut20 (.clk, .rst, .cmd, .gate(gate20));
  dead_time #(.DEAD_CYCLES(3)) dut3 (.clk, .rst, .cmd, .gate(gate3));
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // Reference: time of last cycle any output was on; turn-on allowed once
  // both have been off for D cycles.
  class ref_dt;
    int d;
    bit s1, s2;
    int off_since;   // cycle at which both became off
    int last_fall;
    function new(int dd); d = dd; s1 = 0; s2 = 0; off_since = 0; last_fall = -1000; endfunction
    function void step(int cyc, gate_pair_t c);
      bit n1, n2;
      bit both_off = !s1 && !s2;
      bit ready = both_off && (cyc - off_since >= d);
      n1 = (s1 && c.s1) || (ready && c.s1 && !c.s2);
      n2 = (s2 && c.s2) || (ready && c.s2 && !c.s1);
      if ((s1 || s2) && !n1 && !n2) off_since = cyc;
      s1 = n1; s2 = n2;
    endfunction
  endclass

  ref_dt m20 = new(20);
  ref_dt m3  = new(3);
  int cyc = 0;
  gate_pair_t p20 = GATE_IDLE, p3 = GATE_IDLE;
  int fall20 = 0, fall3 = 0;

  always @(posedge clk) begin
    if (!rst) begin
      cyc = cyc + 1;
      m20.step(cyc, cmd);
      m3.step(cyc, cmd);
      #1;
      check(gate20.s1 == m20.s1 && gate20.s2 == m20.s2, $sformatf("D=20 model %b%b got %b%b", m20.s1, m20.s2, gate20.s1, gate20.s2));
      check(gate3.s1 == m3.s1 && gate3.s2 == m3.s2, "D=3 matches model");
      check(!(gate20.s1 && gate20.s2) && !(gate3.s1 && gate3.s2), "no shoot-through");
      // direct gap measurement
      if ((p20.s1 && !gate20.s1) || (p20.s2 && !gate20.s2)) fall20 = cyc;
      if ((!p20.s1 && gate20.s1) || (!p20.s2 && gate20.s2)) begin
        check(cyc - fall20 >= 20, $sformatf("D=20 gap %0d", cyc - fall20));
        if (cyc - fall20 == 20) gaps20++;
      end
      if ((p3.s1 && !gate3.s1) || (p3.s2 && !gate3.s2)) fall3 = cyc;
      if ((!p3.s1 && gate3.s1) || (!p3.s2 && gate3.s2)) begin
        check(cyc - fall3 >= 3, $sformatf("D=3 gap %0d", cyc - fall3));
        if (cyc - fall3 == 3) gaps3++;
      end
      p20 = gate20;
      p3 = gate3;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int t = 0; t < 400; t++) begin
      int r;
      r = $urandom_range(9, 0);
      if (r < 4)      cmd = GATE_ON;
      else if (r < 8) cmd = GATE_OFF;
      else if (r < 9) cmd = GATE_IDLE;
      else            cmd = '{s1: 1'b1, s2: 1'b1};
      repeat ($urandom_range(40, 1)) @(posedge clk);
      #2;
    end
    // held command is followed after the dead time
    cmd = GATE_ON;
    repeat (30) @(posedge clk);
    #2 check(gate20 == GATE_ON && gate3 == GATE_ON, "settles to command");
    check(gaps20 > 50 && gaps3 > 100, $sformatf("dead times inserted: %0d / %0d", gaps20, gaps3));
    $display("dead times inserted: D=20 %0d, D=3 %0d", gaps20, gaps3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
