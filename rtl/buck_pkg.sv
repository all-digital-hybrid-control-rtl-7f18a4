// buck_pkg: widths, fixed-point formats and the mode type shared by the
// hybrid-control buck converter controller.
//
// The numbers that come from the design description are the 7-bit DPWM
// code (a 127-count ramp), the factor-8 dither (3 residue bits, 10-bit
// effective duty) and the 16-entry reciprocal table of the derivative unit.
// The 8-bit TDC code, the 1-bit coarse truncation and the fixed-point
// scaling of the compensator are this implementation's own choices.
package buck_pkg;

  // High-resolution TDC slack code (one LSB ~ 6 mV at 1.2 V).
  localparam int unsigned TDC_W       = 8;
  // Bits dropped from the TDC code for the PI path (coarse code).
  localparam int unsigned COARSE_SHIFT = 1;
  // DPWM code width (ramp 0..127, one step per core-clock half-cycle).
  localparam int unsigned DPWM_W      = 7;
  // Dither residue bits (factor-8 resolution gain).
  localparam int unsigned DITHER_W    = 3;
  // Effective duty-command width.
  localparam int unsigned DUTY_W      = DPWM_W + DITHER_W;
  // Fraction bits kept inside the compensator below one duty LSB.
  localparam int unsigned PID_FRAC    = 8;
  // Signed derivative estimate width (code steps * reciprocal table value).
  localparam int unsigned DERIV_W     = 12;

  // Control law currently driving the bridge.
  typedef enum logic [1:0] {
    MODE_LINEAR  = 2'd0,  // PID -> delta-sigma -> DPWM drives the bridge
    MODE_DD_HIGH = 2'd1,  // direct drive: switching node held at Vin
    MODE_DD_LOW  = 2'd2   // direct drive: switching node held at Vss
  } mode_e;

endpackage
