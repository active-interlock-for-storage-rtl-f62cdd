// interlock_logic_unit: one set of interlock logic, fed by one beam position
// detector (the primary or the backup detector on one side of an insertion
// device).
//
// Each clock it window-compares the detector's vertical position Y and the
// difference delta = Y - Y_other between this detector and the detector of
// the same chain on the other side of the device, which measures the
// vertical angle. A comparator output that drops to 0 propagates through an
// AND and opens the unit's central relay (relay_drive = 0), which interrupts
// the RF. Two OR gates, one for each comparator, are forced to 1 while the
// unit is disabled: when both DCCT comparators report a current below 3.75 mA
// or when the gap status bit reports the insertion device gap open. The
// horizontal position is not used: the devices are passively safe for
// horizontal missteering.
//
// Interface: y, y_other are signed micrometres; dcct_low_a/b are the two
// DCCT comparator outputs (1 = current low); gap_open is the gap status bit
// (1 = open). status carries the zero-crossing, Y, delta and interlock status
// bits for the microprocessor interface.
//
// Timing: relay_drive and status are registered, one clock after the inputs.
// Reset opens the relay (RF off, the fail-safe state) and reports no fault.
// Registering the outputs and the reset values are choices of this RTL; the
// window bounds come from interlock_pkg.
module interlock_logic_unit
  import interlock_pkg::*;
#(
  parameter pos_t Y_LO = -Y_LIMIT,
  parameter pos_t Y_HI = Y_LIMIT,
  parameter pos_t D_LO = -DELTA_LIMIT,
  parameter pos_t D_HI = DELTA_LIMIT
) (
  input  logic         clk,
  input  logic         rst_n,
  input  pos_t         y,
  input  pos_t         y_other,
  input  logic         dcct_low_a,
  input  logic         dcct_low_b,
  input  logic         gap_open,
  output logic         relay_drive,
  output unit_status_t status
);

  // One bit wider than a position so that the difference cannot wrap.
  localparam int DW = POS_W + 1;

  logic signed [DW-1:0] delta;
  logic y_ok, delta_ok, disabled, y_path, delta_path;

  always_comb delta = DW'(y) - DW'(y_other);

  window_comparator #(.W(POS_W), .LO(Y_LO), .HI(Y_HI)) u_y_window (
    .value     (y),
    .in_window (y_ok)
  );

  window_comparator #(.W(DW), .LO(DW'(D_LO)), .HI(DW'(D_HI))) u_delta_window (
    .value     (delta),
    .in_window (delta_ok)
  );

  always_comb begin
    disabled   = (dcct_low_a && dcct_low_b) || gap_open;
    y_path     = y_ok     || disabled;
    delta_path = delta_ok || disabled;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      relay_drive <= 1'b0;
      status      <= STATUS_IDLE;
    end else begin
      relay_drive <= y_path && delta_path;
      status      <= '{zero_cross: (y > 0), y_ok: y_ok,
                       delta_ok: delta_ok, disabled: disabled};
    end
  end

endmodule
