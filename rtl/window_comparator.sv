// window_comparator: in_window is 1 while LO <= value <= HI and drops to 0 as
// soon as the value leaves that range, as the analog window circuits of the
// interlock logic do for the Y and delta signals.
//
// Purely combinational. The signal is a signed W-bit number; the bounds are
// parameters, as the analog comparators set theirs with fixed references.
// Both bounds count as inside (a choice of this RTL).
module window_comparator #(
  parameter int                  W  = 16,
  parameter logic signed [W-1:0] LO = -16'sd2000,
  parameter logic signed [W-1:0] HI = 16'sd2000
) (
  input  logic signed [W-1:0] value,
  output logic                in_window
);

  always_comb in_window = (value >= LO) && (value <= HI);

endmodule
