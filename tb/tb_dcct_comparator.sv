// tb_dcct_comparator: sweeps the beam current through the 3.75 mA threshold
// (375 steps of 10 uA) and across the full range, checking that the output
// is high exactly while the current is below the threshold.
module tb_dcct_comparator;
  import interlock_pkg::*;

  current_t current;
  logic below_threshold;
  int checks = 0, failures = 0;

  dcct_comparator dut (.current, .below_threshold);

  task automatic check(int c);
    bit expected;
    current = current_t'(c);
    #1;
    expected = (c < 375);  // 3.75 mA in 10 uA steps
    checks++;
    if (below_threshold !== expected) begin
      failures++;
      $display("FAIL current=%0d below=%0b expected=%0b", c, below_threshold, expected);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c <= 800; c++) check(c);
    check(65535);
    repeat (1000) check(int'($urandom_range(65535)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
