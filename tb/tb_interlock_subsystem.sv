// tb_interlock_subsystem: one insertion device's interlock with random beam
// positions at its four detectors, random gap bits, random DCCT bits and
// random latch resets. An integer reference model of the logic units (Y
// window +-2000 um, delta window +-3200 um between the two detectors of a
// chain) and of the first event latch predicts the relay drives and live
// status one clock after the inputs, and the latched status two clocks
// after. Also checks that a gap reported open by the primary bit alone
// leaves the backup units armed.
module tb_interlock_subsystem;
  import interlock_pkg::*;

  logic clk = 0, rst_n = 0;
  pos_t y [N_UNITS];
  logic dcct_low_a, dcct_low_b, gap_primary, gap_backup, reset_ctrl, reset_micro;
  logic relay_drive [N_UNITS];
  unit_status_t status_live [N_UNITS];
  unit_status_t status_out [N_UNITS];
  logic latch_status, all_disabled, all_enabled;
  int checks = 0, failures = 0;
  int n_trip = 0, n_capture = 0, n_half_gap_trip = 0;

  interlock_subsystem dut (.*);

  always #5 clk = ~clk;

  task automatic fail(string what);
    failures++;
    if (failures < 10) $display("FAIL %s at %0t", what, $time);
  endtask

  function automatic unit_status_t unit_model(int yi, int yo, bit dis);
    unit_status_t s;
    s.zero_cross = yi > 0;
    s.y_ok       = (yi >= -2000) && (yi <= 2000);
    s.delta_ok   = (yi - yo >= -3200) && (yi - yo <= 3200);
    s.disabled   = dis;
    return s;
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    unit_status_t prev_s [N_UNITS], s [N_UNITS], held [N_UNITS];
    bit e_relay [N_UNITS];
    bit latched, fault, rl, gap_u;
    int yv [N_UNITS];
    int ndis;
    for (int i = 0; i < N_UNITS; i++) begin
      y[i] = '0; prev_s[i] = STATUS_IDLE; held[i] = STATUS_IDLE;
    end
    latched = 0;
    {dcct_low_a, dcct_low_b, gap_primary, gap_backup, reset_ctrl, reset_micro} = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 6000; n++) begin
      @(negedge clk);
      // a beam with a position offset and an angle, plus detector noise
      begin
        int off, ang;
        off = int'($urandom_range(5000)) - 2500;
        ang = int'($urandom_range(4400)) - 2200;
        for (int i = 0; i < N_UNITS; i++)
          yv[i] = off + ((i < 2) ? ang : -ang) + int'($urandom_range(20)) - 10;
      end
      for (int i = 0; i < N_UNITS; i++) y[i] = pos_t'(yv[i]);
      dcct_low_a  = ($urandom_range(3) == 0);
      dcct_low_b  = ($urandom_range(3) == 0);
      gap_primary = ($urandom_range(3) == 0);
      gap_backup  = ($urandom_range(3) == 0);
      reset_ctrl  = ($urandom_range(30) == 0);
      reset_micro = ($urandom_range(30) == 0);
      #1;
      for (int i = 0; i < N_UNITS; i++) begin
        gap_u = (i == int'(UP_PRI) || i == int'(DN_PRI)) ? gap_primary : gap_backup;
        s[i] = unit_model(yv[i], yv[i ^ 2], (dcct_low_a && dcct_low_b) || gap_u);
        e_relay[i] = (s[i].y_ok || s[i].disabled) && (s[i].delta_ok || s[i].disabled);
      end
      // monitors see the live status registered at the previous edge
      ndis = 0;
      for (int i = 0; i < N_UNITS; i++) ndis += prev_s[i].disabled;
      checks++;
      if (all_disabled !== (ndis == 4) || all_enabled !== (ndis == 0)) fail("AND/NOR monitor");
      // first event latch, fed with the live status of the previous edge
      fault = 0;
      for (int i = 0; i < N_UNITS; i++) if (!prev_s[i].y_ok || !prev_s[i].delta_ok) fault = 1;
      rl = reset_ctrl || reset_micro;
      if (rl || !latched) for (int i = 0; i < N_UNITS; i++) held[i] = prev_s[i];
      if (!latched && !rl && fault) n_capture++;
      if (rl) latched = 0;
      else if (fault) latched = 1;
      @(posedge clk);
      #1;
      for (int i = 0; i < N_UNITS; i++) begin
        checks += 3;
        if (relay_drive[i] !== e_relay[i]) fail($sformatf("relay %0d", i));
        if (status_live[i] !== s[i]) fail($sformatf("live status %0d", i));
        if (status_out[i] !== held[i]) fail($sformatf("latched status %0d", i));
        if (!e_relay[i]) n_trip++;
        prev_s[i] = s[i];
      end
      checks++;
      if (latch_status !== latched) fail("latch status");
      // primary gap open alone: the backup units still trip on a bad beam
      if (gap_primary && !gap_backup && !(dcct_low_a && dcct_low_b) &&
          (!s[UP_BAK].y_ok || !s[UP_BAK].delta_ok)) n_half_gap_trip++;
    end
    checks++;
    if (n_trip == 0 || n_capture == 0 || n_half_gap_trip == 0) begin
      failures++;
      $display("FAIL coverage trips=%0d captures=%0d half_gap=%0d", n_trip, n_capture, n_half_gap_trip);
    end
    $display("trips=%0d captures=%0d half_gap_trips=%0d", n_trip, n_capture, n_half_gap_trip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
