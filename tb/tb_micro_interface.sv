// tb_micro_interface: drives the microprocessor interface with random status
// bits of the four logic units, mostly fault-free, and random pulses on the
// two reset lines. A reference model of the first event latch predicts the
// held status bits and the latch status bit one clock later; the AND/NOR
// monitors and the gap fan-out are checked at once. Counts that the latch
// captured, was held, was reset and was inhibited at least once.
module tb_micro_interface;
  import interlock_pkg::*;

  logic clk = 0, rst_n = 0;
  unit_status_t status_in [N_UNITS];
  logic reset_ctrl, reset_micro, gap_primary, gap_backup;
  unit_status_t status_out [N_UNITS];
  logic latch_status, all_disabled, all_enabled;
  logic gap_to_unit [N_UNITS];
  int checks = 0, failures = 0;
  int n_capture = 0, n_held = 0, n_reset = 0, n_inhibit = 0, n_all_dis = 0, n_all_en = 0;

  micro_interface dut (.*);

  always #5 clk = ~clk;

  task automatic fail(string what);
    failures++;
    if (failures < 10) $display("FAIL %s at %0t", what, $time);
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    unit_status_t m_held [N_UNITS];
    bit m_latched, fault, rl;
    int ndis;
    for (int i = 0; i < N_UNITS; i++) begin
      status_in[i] = STATUS_IDLE;
      m_held[i] = STATUS_IDLE;
    end
    m_latched = 0;
    reset_ctrl = 0; reset_micro = 0; gap_primary = 0; gap_backup = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      for (int i = 0; i < N_UNITS; i++) begin
        status_in[i] = STATUS_IDLE;
        status_in[i].zero_cross = 1'($urandom);
        status_in[i].disabled   = ($urandom_range(3) != 0) ? (n / 300) % 2 == 1 : 1'($urandom);
        if ($urandom_range(40) == 0) status_in[i].y_ok = 0;
        if ($urandom_range(60) == 0) status_in[i].delta_ok = 0;
      end
      reset_ctrl  = ($urandom_range(50) == 0);
      reset_micro = ($urandom_range(50) == 0) || ((n / 500) % 4 == 3);
      {gap_primary, gap_backup} = 2'($urandom);
      #1;
      // combinational outputs
      ndis = 0;
      for (int i = 0; i < N_UNITS; i++) ndis += status_in[i].disabled;
      checks++;
      if (all_disabled !== (ndis == 4) || all_enabled !== (ndis == 0)) fail("AND/NOR monitor");
      if (ndis == 4) n_all_dis++;
      if (ndis == 0) n_all_en++;
      checks++;
      if (gap_to_unit[UP_PRI] !== gap_primary || gap_to_unit[DN_PRI] !== gap_primary ||
          gap_to_unit[UP_BAK] !== gap_backup  || gap_to_unit[DN_BAK] !== gap_backup)
        fail("gap fan-out");
      // reference latch
      fault = 0;
      for (int i = 0; i < N_UNITS; i++) if (!status_in[i].y_ok || !status_in[i].delta_ok) fault = 1;
      rl = reset_ctrl || reset_micro;
      if (rl && m_latched) n_reset++;
      if (rl && fault) n_inhibit++;
      if (m_latched && !rl) n_held++;
      if (!m_latched && !rl && fault) n_capture++;
      if (rl || !m_latched) for (int i = 0; i < N_UNITS; i++) m_held[i] = status_in[i];
      if (rl) m_latched = 0;
      else if (fault) m_latched = 1;
      @(posedge clk);
      #1;
      checks++;
      if (latch_status !== m_latched) fail("latch status");
      for (int i = 0; i < N_UNITS; i++) begin
        checks++;
        if (status_out[i] !== m_held[i]) fail($sformatf("held status of unit %0d", i));
      end
    end
    checks++;
    if (n_capture == 0 || n_held == 0 || n_reset == 0 || n_inhibit == 0 || n_all_dis == 0 || n_all_en == 0) begin
      failures++;
      $display("FAIL coverage capture=%0d held=%0d reset=%0d inhibit=%0d and=%0d nor=%0d",
               n_capture, n_held, n_reset, n_inhibit, n_all_dis, n_all_en);
    end
    $display("captures=%0d held=%0d resets=%0d inhibited=%0d", n_capture, n_held, n_reset, n_inhibit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
