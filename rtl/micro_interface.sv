// micro_interface: the microprocessor interface of one interlock subsystem.
//
// First event latch: while it is open, status_out follows the status bits of
// the four logic units. In the first clock in which any Y status or delta
// status bit is low it captures that clock's bits and holds them, so that the
// cause of a trip survives the beam dump that follows. latch_status is 1 while
// it holds. Drawing the reset line high (from the control room, reset_ctrl,
// or from the local micro, reset_micro) clears the latch and, for as long as
// it stays high, inhibits it, so that status_out keeps following the inputs.
//
// The interlock status bits of the four units are watched by a four-input AND
// (all_disabled: all four units disabled) and a four-input NOR (all_enabled:
// all four enabled); both look at the live bits, not the latched ones.
// The gap signals of the insertion device are split here and sent to the
// logic units: the primary gap bit to the two primary units, the backup gap
// bit to the two backup units.
//
// Timing: status_out and latch_status are registered, one clock after the
// inputs; all_disabled, all_enabled and gap_to_unit are combinational. The
// clocked latch, the live AND/NOR inputs and the primary/backup gap split are
// choices of this RTL.
module micro_interface
  import interlock_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  unit_status_t status_in   [N_UNITS],
  input  logic         reset_ctrl,
  input  logic         reset_micro,
  input  logic         gap_primary,
  input  logic         gap_backup,
  output unit_status_t status_out  [N_UNITS],
  output logic         latch_status,
  output logic         all_disabled,
  output logic         all_enabled,
  output logic         gap_to_unit [N_UNITS]
);

  logic reset_line;
  logic first_event;
  logic [N_UNITS-1:0] disabled_bits;
  unit_status_t [N_UNITS-1:0] held;   // the latch itself

  always_comb begin
    reset_line  = reset_ctrl || reset_micro;
    first_event = 1'b0;
    for (int i = 0; i < N_UNITS; i++) begin
      if (!status_in[i].y_ok || !status_in[i].delta_ok) first_event = 1'b1;
      disabled_bits[i] = status_in[i].disabled;
    end
    all_disabled = &disabled_bits;
    all_enabled  = ~|disabled_bits;
  end

  always_comb begin
    gap_to_unit[UP_PRI] = gap_primary;
    gap_to_unit[DN_PRI] = gap_primary;
    gap_to_unit[UP_BAK] = gap_backup;
    gap_to_unit[DN_BAK] = gap_backup;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      latch_status <= 1'b0;
      held         <= {N_UNITS{STATUS_IDLE}};
    end else begin
      if (reset_line)       latch_status <= 1'b0;
      else if (first_event) latch_status <= 1'b1;
      if (reset_line || !latch_status)
        for (int i = 0; i < N_UNITS; i++) held[i] <= status_in[i];
    end
  end

  always_comb
    for (int i = 0; i < N_UNITS; i++) status_out[i] = held[i];

  // A latched interface keeps its captured bits until the reset line is drawn.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    latch_status && !reset_line |=> latch_status && $stable(held));

endmodule
