// tb_sine_lut: checks every entry of the 400-sample sine table against a
// reference computed in the testbench with real arithmetic (one period of
// 1024*sin), plus the shape: peaks of +-1024 at a quarter and three quarters
// of the period, zeros at 0 and half period, odd symmetry, and 0 for
// addresses past the table.
module tb_sine_lut;
  timeunit 1ns;
  timeprecision 100ps;
  import nlm_pkg::*;

  logic [ADDR_W-1:0] addr;
  sine_t             sine;
  int checks = 0, failures = 0;

  sine_lut dut (.addr, .sine);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int ref_sine(input int i);
    real v;
    v = 1024.0 * $sin(2.0 * 3.14159265358979323846 * i / 400.0);
    return (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction

  int table_val [400];

  initial begin
    for (int i = 0; i < 400; i++) begin
      addr = ADDR_W'(i);
      #1;
      table_val[i] = int'(sine);
      // Ties (exactly .5) are not reachable for this table; allow 1 LSB for safety.
      check(table_val[i] - ref_sine(i) <= 1 && ref_sine(i) - table_val[i] <= 1,
            $sformatf("entry %0d = %0d, expected %0d", i, table_val[i], ref_sine(i)));
    end
    check(table_val[0] == 0 && table_val[200] == 0, "zero crossings");
    check(table_val[100] == 1024, "positive peak");
    check(table_val[300] == -1024, "negative peak");
    check(table_val[50] > 700 && table_val[50] < 750, "value at one eighth period");
    for (int i = 1; i < 200; i++)
      check(table_val[i] == -table_val[400 - i], $sformatf("odd symmetry %0d", i));
    for (int i = 1; i < 100; i++)
      check(table_val[i] >= table_val[i - 1], $sformatf("non-decreasing on first quarter %0d", i));
    addr = ADDR_W'(450);
    #1 check(sine == 0, "address past table reads 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
