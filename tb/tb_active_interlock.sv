// tb_active_interlock: runs the whole interlock, at its default size of three
// insertion devices, through the pre-fill test procedure and the faults it
// is built to catch.
//
// A small beam model stands in for the storage ring: the testbench sets the
// stored current (both DCCTs read it), applies closed orbit distortions at
// one device at a time (a position offset and an angle, seen with opposite
// signs by the upstream and downstream detectors), and dumps the beam a few
// clocks after the RF permit drops. The sequence:
//   1. latches inhibited, 2.5 mA: downward and upward angle distortions at
//      each device turn all four Y status bits of that device low, with the
//      zero-crossing bits reversing between the two; RF stays on, every
//      interlock status bit is high;
//   2. 5 mA: interlock enabled everywhere, latches armed; an angle
//      distortion trips the RF one clock later, the first event latch keeps
//      the cause after the beam is dumped, the RF comes back once the current
//      is below 3.75 mA, and a control-room reset clears the latch;
//   3. a delta-only fault, a Y-only fault, a gap open on the primary bit only
//      (backup units still trip), a gap open on both bits (no trip), and one
//      DCCT reading low (still armed).
// Each mechanism is counted; one that never happens counts as a failure.
module tb_active_interlock;
  import interlock_pkg::*;

  localparam int N_ID = 3;
  localparam int DUMP_CYCLES = 4;   // beam loss this many clocks after the RF stops

  logic clk = 0, rst_n = 0;
  current_t beam_current_a, beam_current_b;
  pos_t y [N_ID][N_UNITS];
  logic gap_primary [N_ID], gap_backup [N_ID], reset_ctrl [N_ID], reset_micro [N_ID];
  logic dcct_low_a, dcct_low_b;
  logic relay_drive [N_ID][N_UNITS];
  unit_status_t status_live [N_ID][N_UNITS];
  unit_status_t status_out [N_ID][N_UNITS];
  logic latch_status [N_ID], all_disabled [N_ID], all_enabled [N_ID];
  logic rf_permit;

  int checks = 0, failures = 0;
  int current_10ua = 0;      // beam model state
  int rf_off_cycles = 0;
  int dcct_a_error = 0;      // reading error of DCCT a, in 10 uA steps

  typedef enum int {
    M_TRIP, M_DUMP, M_RF_RESTORE, M_LOW_CURRENT_DISABLE, M_ALL_DISABLED, M_ALL_ENABLED,
    M_ZERO_CROSS_REVERSAL, M_INHIBIT, M_CAPTURE, M_LATCH_RESET, M_DELTA_TRIP, M_Y_TRIP,
    M_GAP_DISABLE, M_HALF_GAP_ARMED, M_ONE_DCCT_ARMED, M_COUNT
  } mech_e;
  int mech [M_COUNT];

  active_interlock dut (.*);

  always #5 clk = ~clk;

  // Beam model: both DCCTs read the stored current; with the RF off the
  // beam is lost after DUMP_CYCLES clocks.
  always @(posedge clk) begin
    if (rst_n && !rf_permit && current_10ua > 0) begin
      rf_off_cycles++;
      if (rf_off_cycles >= DUMP_CYCLES) begin
        current_10ua = 0;
        mech[M_DUMP]++;
      end
    end else begin
      rf_off_cycles = 0;
    end
  end
  always_comb begin
    beam_current_a = current_t'((current_10ua > dcct_a_error) ? current_10ua - dcct_a_error : 0);
    beam_current_b = current_t'(current_10ua);
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic tick(int n = 1);
    repeat (n) @(posedge clk);
    #1;
  endtask

  // Orbit at device d: offset and angle in um; the upstream detectors see
  // offset + angle, the downstream ones offset - angle.
  task automatic orbit(int d, int offset, int angle);
    @(negedge clk);
    y[d][UP_PRI] = pos_t'(offset + angle);
    y[d][UP_BAK] = pos_t'(offset + angle + 3);   // the two detectors differ a little
    y[d][DN_PRI] = pos_t'(offset - angle);
    y[d][DN_BAK] = pos_t'(offset - angle - 2);
  endtask

  task automatic clear_orbits();
    for (int d = 0; d < N_ID; d++) orbit(d, 0, 0);
  endtask

  task automatic inject(int c);
    @(negedge clk);
    current_10ua = c;
  endtask

  task automatic set_inhibit(bit v);
    @(negedge clk);
    for (int d = 0; d < N_ID; d++) reset_micro[d] = v;
  endtask

  function automatic bit all_y_low(int d);
    for (int u = 0; u < N_UNITS; u++) if (status_live[d][u].y_ok) return 0;
    return 1;
  endfunction

  // A fault is applied at device d while the interlock is armed: the RF must
  // stop exactly one clock later, the latch must hold the cause after the
  // beam is dumped and the orbit restored, and the RF must come back.
  task automatic armed_fault(int d, int offset, int angle, bit exp_y_ok, bit exp_d_ok,
                             string name);
    orbit(d, offset, angle);
    check(rf_permit === 1'b1, {name, ": RF on before the edge"});
    tick();
    check(rf_permit === 1'b0, {name, ": RF off one clock after the fault"});
    if (rf_permit === 1'b0) begin
      mech[M_TRIP]++;
      if (exp_y_ok && !exp_d_ok) mech[M_DELTA_TRIP]++;
      if (!exp_y_ok && exp_d_ok) mech[M_Y_TRIP]++;
    end
    tick();
    check(latch_status[d] === 1'b1, {name, ": first event latch set"});
    if (latch_status[d]) mech[M_CAPTURE]++;
    for (int u = 0; u < N_UNITS; u++)
      check(status_out[d][u].y_ok === exp_y_ok && status_out[d][u].delta_ok === exp_d_ok,
            $sformatf("%s: latched status of unit %0d", name, u));
    tick(DUMP_CYCLES + 2);
    check(current_10ua == 0, {name, ": beam dumped"});
    check(dcct_low_a && dcct_low_b, {name, ": DCCT comparators see no current"});
    check(rf_permit === 1'b1, {name, ": RF restored after the dump"});
    if (rf_permit && current_10ua == 0) mech[M_RF_RESTORE]++;
    orbit(d, 0, 0);
    tick(3);
    check(latch_status[d] === 1'b1 && status_out[d][UP_PRI].y_ok === exp_y_ok &&
          status_out[d][UP_PRI].delta_ok === exp_d_ok, {name, ": latch survives the dump"});
    for (int e = 0; e < N_ID; e++)
      if (e != d) check(latch_status[e] === 1'b0, {name, ": other devices not latched"});
    // control room reset
    @(negedge clk);
    reset_ctrl[d] = 1;
    tick();
    @(negedge clk);
    reset_ctrl[d] = 0;
    tick(2);
    check(latch_status[d] === 1'b0 && status_out[d][UP_PRI].y_ok === 1'b1,
          {name, ": latch reset from the control room"});
    if (!latch_status[d]) mech[M_LATCH_RESET]++;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int trips_before;
    for (int d = 0; d < N_ID; d++) begin
      for (int u = 0; u < N_UNITS; u++) y[d][u] = '0;
      gap_primary[d] = 0; gap_backup[d] = 0; reset_ctrl[d] = 0; reset_micro[d] = 0;
    end
    for (int m = 0; m < M_COUNT; m++) mech[m] = 0;
    tick(3);
    check(rf_permit === 1'b0, "RF off during reset");
    @(negedge clk);
    rst_n = 1;
    tick(2);
    check(rf_permit === 1'b1, "no beam: interlock disabled, RF on");

    // ---- 1. low-current part of the test procedure ----
    set_inhibit(1);
    inject(250);                                   // 2.5 mA
    tick(2);
    for (int d = 0; d < N_ID; d++) begin
      check(all_disabled[d] && !all_enabled[d], $sformatf("2.5 mA: device %0d disabled", d));
      if (all_disabled[d]) mech[M_ALL_DISABLED]++;
    end
    for (int d = 0; d < N_ID; d++) begin
      bit down_zc_up, up_zc_up;
      orbit(d, 0, 2600);                           // downward angle: beam high upstream, low downstream
      tick(2);
      check(all_y_low(d), $sformatf("downward angle at %0d: all Y status low", d));
      check(status_live[d][UP_PRI].zero_cross && status_live[d][UP_BAK].zero_cross &&
            !status_live[d][DN_PRI].zero_cross && !status_live[d][DN_BAK].zero_cross,
            $sformatf("downward angle at %0d: zero crossing up=1 down=0", d));
      down_zc_up = status_live[d][UP_PRI].zero_cross;
      check(rf_permit === 1'b1, "2.5 mA: RF stays on");
      if (rf_permit) mech[M_LOW_CURRENT_DISABLE]++;
      check(latch_status[d] === 1'b0 && !status_out[d][UP_PRI].y_ok, "inhibited latch follows");
      if (!latch_status[d] && !status_out[d][UP_PRI].y_ok) mech[M_INHIBIT]++;
      for (int u = 0; u < N_UNITS; u++) check(status_live[d][u].disabled, "interlock status high");
      orbit(d, 0, -2600);                          // upward angle
      tick(2);
      check(all_y_low(d), $sformatf("upward angle at %0d: all Y status low", d));
      check(!status_live[d][UP_PRI].zero_cross && !status_live[d][UP_BAK].zero_cross &&
            status_live[d][DN_PRI].zero_cross && status_live[d][DN_BAK].zero_cross,
            $sformatf("upward angle at %0d: zero crossing up=0 down=1", d));
      up_zc_up = status_live[d][UP_PRI].zero_cross;
      if (down_zc_up != up_zc_up) mech[M_ZERO_CROSS_REVERSAL]++;
      orbit(d, 0, 0);
      tick(2);
    end

    // ---- 2. 5 mA: interlock enabled, one device tested with a dump ----
    inject(500);
    tick(2);
    for (int d = 0; d < N_ID; d++) begin
      check(all_enabled[d] && !all_disabled[d], $sformatf("5 mA: device %0d enabled", d));
      if (all_enabled[d]) mech[M_ALL_ENABLED]++;
    end
    set_inhibit(0);
    tick(2);
    armed_fault(1, 0, 2600, 1'b0, 1'b0, "angle fault at device 1");

    // ---- 3. the other mechanisms ----
    inject(500);
    tick(2);
    armed_fault(2, 0, 1700, 1'b1, 1'b0, "delta-only fault at device 2");   // |Y| 1700, delta 3400
    inject(500);
    tick(2);
    armed_fault(0, 2500, 0, 1'b0, 1'b1, "Y-only fault at device 0");       // parallel offset

    // gap open on the primary bit only: backup units stay armed
    inject(500);
    @(negedge clk);
    gap_primary[0] = 1;
    tick(2);
    check(!all_disabled[0] && !all_enabled[0], "primary gap open: half the units disabled");
    check(relay_drive[0][UP_PRI] && relay_drive[0][DN_PRI], "primary gap open: primary relays closed");
    trips_before = mech[M_TRIP];
    armed_fault(0, 0, 2600, 1'b0, 1'b0, "fault with the primary gap bit open");
    if (mech[M_TRIP] > trips_before) mech[M_HALF_GAP_ARMED]++;

    // gap open on both bits: no trip while the gap is open
    inject(500);
    @(negedge clk);
    gap_backup[0] = 1;
    tick(2);
    check(all_disabled[0], "gap open: device 0 disabled at 5 mA");
    orbit(0, 0, 2600);
    tick(3);
    check(rf_permit === 1'b1 && current_10ua == 500, "gap open: distortion does not trip the RF");
    if (rf_permit && current_10ua == 500) mech[M_GAP_DISABLE]++;
    orbit(0, 0, 0);
    @(negedge clk);
    gap_primary[0] = 0; gap_backup[0] = 0;
    tick(2);
    // the inhibit-free latch caught the Y faults seen while the gap was open
    @(negedge clk);
    reset_micro[0] = 1;
    tick();
    @(negedge clk);
    reset_micro[0] = 0;
    tick(2);
    check(latch_status[0] === 1'b0, "latch reset by the micro");

    // one DCCT reading below the threshold: the other keeps the interlock armed
    @(negedge clk);
    current_10ua = 500;
    dcct_a_error = 400;
    tick(2);
    check(dcct_low_a && !dcct_low_b && all_enabled[2], "one DCCT low: still enabled");
    trips_before = mech[M_TRIP];
    armed_fault(2, 0, -2600, 1'b0, 1'b0, "fault with one DCCT low");
    dcct_a_error = 0;
    if (mech[M_TRIP] > trips_before) mech[M_ONE_DCCT_ARMED]++;

    for (int m = 0; m < M_COUNT; m++) begin
      check(mech[m] > 0, $sformatf("mechanism %s happened", mech_e'(m)));
      $display("mechanism %-24s %0d", mech_e'(m), mech[m]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
