// interlock_pkg: types and constants shared by the active interlock RTL.
//
// The interlock works on digitised versions of the analog signals of the
// original circuit: a beam position is a signed number of micrometres, a beam
// current an unsigned number of 10 uA steps. The 3.75 mA enable threshold and
// the 1.6 mrad angle limit are the design's own figures; the window widths,
// the spacing of the pick-up electrodes and all number formats are choices of
// this RTL.
package interlock_pkg;

  // Beam position (Y or delta) in micrometres, two's complement.
  localparam int POS_W = 16;
  typedef logic signed [POS_W-1:0] pos_t;

  // Stored beam current in steps of 10 uA (65535 steps = 655 mA).
  localparam int CUR_W = 16;
  typedef logic [CUR_W-1:0] current_t;

  // Below this current both DCCT comparators disable the interlock: 3.75 mA.
  localparam current_t DCCT_THRESHOLD = current_t'(375);

  // Position window of the Y comparator (+-2 mm, a choice of this RTL).
  localparam pos_t Y_LIMIT = pos_t'(2000);

  // Angle limit 1.6 mrad times an assumed 2 m between the upstream and the
  // downstream pick-up electrodes gives the delta (Y difference) window.
  localparam int ANGLE_LIMIT_URAD = 1600;
  localparam int PUE_SPACING_MM   = 2000;
  localparam pos_t DELTA_LIMIT    = pos_t'(ANGLE_LIMIT_URAD * PUE_SPACING_MM / 1000);

  // The four logic units of one subsystem.
  localparam int N_UNITS = 4;
  typedef enum logic [1:0] {
    UP_PRI = 2'd0,  // upstream PUEs, primary detector
    UP_BAK = 2'd1,  // upstream PUEs, backup detector
    DN_PRI = 2'd2,  // downstream PUEs, primary detector
    DN_BAK = 2'd3   // downstream PUEs, backup detector
  } unit_idx_e;

  // Status bits one logic unit reports to the microprocessor interface.
  typedef struct packed {
    logic zero_cross;  // 1: beam above the centre (Y > 0)
    logic y_ok;        // Y window comparator: 1 inside, 0 outside
    logic delta_ok;    // delta window comparator: 1 inside, 0 outside
    logic disabled;    // interlock status: 1 while low current or open gap disables the unit
  } unit_status_t;

  // Status bits of a unit that has seen no fault and is enabled.
  localparam unit_status_t STATUS_IDLE = '{zero_cross: 1'b0, y_ok: 1'b1,
                                           delta_ok: 1'b1, disabled: 1'b0};

endpackage
