// tb_sm_on: the SM ON pattern source holds both switches open during reset,
// drives S1 = 1, S2 = 0 from the first clock after release, and returns to
// both open at once when reset is asserted again (asynchronous reset).
module tb_sm_on;
  timeunit 1ns;
  timeprecision 100ps;
  import nlm_pkg::*;
  logic clk = 1'b0, rst = 1'b0;
  gate_pair_t pattern;
  int checks = 0, failures = 0;

  sm_on dut (.clk, .rst, .pattern);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    for (int round = 0; round < 3; round++) begin
      #1 rst = 1'b1;   // reset button pressed
      #1 check(pattern.s1 == 1'b0 && pattern.s2 == 1'b0, "open at once when reset is pressed");
      repeat (2) @(posedge clk);
      #1 check(pattern.s1 == 1'b0 && pattern.s2 == 1'b0, "open while reset held");
      rst = 1'b0;
      #1 check(pattern.s1 == 1'b0 && pattern.s2 == 1'b0, "open until first clock");
      repeat ($urandom_range(20, 1)) begin
        @(posedge clk); #1;
        check(pattern.s1 == 1'b1 && pattern.s2 == 1'b0, "ON pattern S1=1 S2=0");
      end
      #2;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
