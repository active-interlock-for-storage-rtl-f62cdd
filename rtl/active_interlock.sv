// active_interlock: the active interlock for the insertion devices of a
// storage ring, three devices by default (two hybrid wigglers and one
// superconducting wiggler).
//
// Each device has its own interlock_subsystem. Two DCCT comparators turn the
// stored beam current into the enable bits shared by all subsystems: the
// interlock is active only when at least one of them sees 3.75 mA or more.
// The contacts of the central relays, one per logic unit, are in series in
// the RF permit loop, so rf_permit is the AND of all relay drives: any
// unit that sees the beam out of its window while enabled turns the RF off.
// When the beam is lost, the current falls below the threshold, the
// interlock disables itself and the RF comes back.
//
// Interface: per device, y[d][u] is the vertical position from detector u
// (interlock_pkg::unit_idx_e), gap_primary/gap_backup the gap bits (1 =
// open), reset_ctrl/reset_micro the first-event latch reset lines. The
// status, latch and monitor outputs go to the local micro and the control
// room display.
//
// Timing: rf_permit and relay_drive follow the inputs one clock later; the
// latched status bits two clocks later. Modelling the series relay contacts
// as an AND is a choice of this RTL.
module active_interlock
  import interlock_pkg::*;
#(
  parameter int N_ID = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  current_t     beam_current_a,
  input  current_t     beam_current_b,
  input  pos_t         y            [N_ID][N_UNITS],
  input  logic         gap_primary  [N_ID],
  input  logic         gap_backup   [N_ID],
  input  logic         reset_ctrl   [N_ID],
  input  logic         reset_micro  [N_ID],
  output logic         dcct_low_a,
  output logic         dcct_low_b,
  output logic         relay_drive  [N_ID][N_UNITS],
  output unit_status_t status_live  [N_ID][N_UNITS],
  output unit_status_t status_out   [N_ID][N_UNITS],
  output logic         latch_status [N_ID],
  output logic         all_disabled [N_ID],
  output logic         all_enabled  [N_ID],
  output logic         rf_permit
);

  dcct_comparator u_dcct_a (.current(beam_current_a), .below_threshold(dcct_low_a));
  dcct_comparator u_dcct_b (.current(beam_current_b), .below_threshold(dcct_low_b));

  for (genvar d = 0; d < N_ID; d++) begin : g_id
    interlock_subsystem u_sub (
      .clk          (clk),
      .rst_n        (rst_n),
      .y            (y[d]),
      .dcct_low_a   (dcct_low_a),
      .dcct_low_b   (dcct_low_b),
      .gap_primary  (gap_primary[d]),
      .gap_backup   (gap_backup[d]),
      .reset_ctrl   (reset_ctrl[d]),
      .reset_micro  (reset_micro[d]),
      .relay_drive  (relay_drive[d]),
      .status_live  (status_live[d]),
      .status_out   (status_out[d]),
      .latch_status (latch_status[d]),
      .all_disabled (all_disabled[d]),
      .all_enabled  (all_enabled[d])
    );
  end

  always_comb begin
    rf_permit = 1'b1;
    for (int d = 0; d < N_ID; d++)
      for (int u = 0; u < N_UNITS; u++)
        rf_permit &= relay_drive[d][u];
  end

endmodule
