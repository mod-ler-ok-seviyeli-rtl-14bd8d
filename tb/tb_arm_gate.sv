// tb_arm_gate: checks the arm gate signal module. Random counts 0..4 are
// presented with and without the level_valid strobe; after each strobe
// submodules below the count must get the ON pattern and the rest the OFF
// pattern, one cycle later, and without a strobe the outputs must hold. The
// reset level (2 inserted) and pass-through of the patterns (including the
// all-open pattern during reset) are checked as well.
module tb_arm_gate;
  timeunit 1ns;
  timeprecision 100ps;
  import nlm_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic level_valid = 1'b0;
  level_t n_active = '0;
  gate_pair_t on_pattern, off_pattern;
  gate_pair_t gates [N_SM];
  int checks = 0, failures = 0;
  int expect_n;

  arm_gate dut (.clk, .rst, .level_valid, .n_active, .on_pattern, .off_pattern, .gates);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  task automatic check_gates(input int n, input gate_pair_t on_p, input gate_pair_t off_p);
    for (int i = 0; i < 4; i++) begin
      if (i < n) check(gates[i] == on_p,  $sformatf("n=%0d SM%0d should be ON", n, i));
      else       check(gates[i] == off_p, $sformatf("n=%0d SM%0d should be OFF", n, i));
    end
  endtask

  initial begin
    on_pattern  = GATE_IDLE;
    off_pattern = GATE_IDLE;
    #1 check_gates(2, GATE_IDLE, GATE_IDLE);
    @(posedge clk); #1;
    rst = 1'b0;
    on_pattern  = GATE_ON;
    off_pattern = GATE_OFF;
    #1 check_gates(2, GATE_ON, GATE_OFF);   // reset level: two inserted
    expect_n = 2;
    for (int t = 0; t < 300; t++) begin
      n_active    = LEVEL_W'($urandom_range(4, 0));
      level_valid = ($urandom_range(2, 0) != 0);
      @(posedge clk); #1;
      if (level_valid) expect_n = int'(n_active);
      check_gates(expect_n, GATE_ON, GATE_OFF);
    end
    // every count at least once
    level_valid = 1'b1;
    for (int n = 0; n <= 4; n++) begin
      n_active = LEVEL_W'(n);
      @(posedge clk); #1 check_gates(n, GATE_ON, GATE_OFF);
    end
    level_valid = 1'b0;
    rst = 1'b1;
    #1 check_gates(2, GATE_ON, GATE_OFF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
