// interlock_subsystem: the interlock of one insertion device.
//
// Four pick-up electrode sets and detectors watch the beam, two (primary and
// backup) on each side of the device. Each detector feeds one logic unit; a
// unit compares its own Y with the Y of the detector of the same chain on the
// other side to form delta, the angle signal. The four units drive four
// central relays; opening any one of them interrupts the RF. The
// microprocessor interface latches the units' status bits on the first
// fault, watches their interlock status bits and fans the gap signals out
// to them. Both DCCT comparator outputs go directly to all four units.
//
// Interface: y[] is indexed by interlock_pkg::unit_idx_e (UP_PRI, UP_BAK,
// DN_PRI, DN_BAK). All outputs are registered in the logic units or the
// interface: relay_drive follows y one clock later, status_out two clocks
// later. Pairing the units by chain for delta is a choice of this RTL.
module interlock_subsystem
  import interlock_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  pos_t         y          [N_UNITS],
  input  logic         dcct_low_a,
  input  logic         dcct_low_b,
  input  logic         gap_primary,
  input  logic         gap_backup,
  input  logic         reset_ctrl,
  input  logic         reset_micro,
  output logic         relay_drive [N_UNITS],
  output unit_status_t status_live [N_UNITS],
  output unit_status_t status_out  [N_UNITS],
  output logic         latch_status,
  output logic         all_disabled,
  output logic         all_enabled
);

  logic gap_to_unit [N_UNITS];

  // The unit on the other side of the device in the same (primary or
  // backup) chain: index bit 1 selects the side, bit 0 the chain.
  function automatic int other_side(int i);
    return i ^ 2;
  endfunction

  for (genvar i = 0; i < N_UNITS; i++) begin : g_unit
    interlock_logic_unit u_logic (
      .clk         (clk),
      .rst_n       (rst_n),
      .y           (y[i]),
      .y_other     (y[other_side(i)]),
      .dcct_low_a  (dcct_low_a),
      .dcct_low_b  (dcct_low_b),
      .gap_open    (gap_to_unit[i]),
      .relay_drive (relay_drive[i]),
      .status      (status_live[i])
    );
  end

  micro_interface u_iface (
    .clk          (clk),
    .rst_n        (rst_n),
    .status_in    (status_live),
    .reset_ctrl   (reset_ctrl),
    .reset_micro  (reset_micro),
    .gap_primary  (gap_primary),
    .gap_backup   (gap_backup),
    .status_out   (status_out),
    .latch_status (latch_status),
    .all_disabled (all_disabled),
    .all_enabled  (all_enabled),
    .gap_to_unit  (gap_to_unit)
  );

endmodule
