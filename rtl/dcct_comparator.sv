// dcct_comparator: turns the stored beam current measured by the DC current
// transformer (DCCT) into the enable bit of the interlock. below_threshold is
// 1 (the 15 V level of the original circuit) while the current is below
// THRESHOLD, 3.75 mA, and 0 at or above it.
//
// Purely combinational. current counts 10 uA steps, so the default threshold
// is 375. A current of exactly the threshold enables the interlock (a choice
// of this RTL; the design only says "below 3.75 mA").
module dcct_comparator
  import interlock_pkg::*;
#(
  parameter current_t THRESHOLD = DCCT_THRESHOLD
) (
  input  current_t current,
  output logic     below_threshold
);

  always_comb below_threshold = (current < THRESHOLD);

endmodule
