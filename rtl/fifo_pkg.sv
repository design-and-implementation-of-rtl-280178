// fifo_pkg: types and constants shared by the two SRAM-based FIFO memories.
//
// The supply-mode enum names the three cell-supply conditions of a sub-block in
// the row-controlled DVS FIFO (cut off, VDDL = 0.3 V, VDDH = 0.5 V) plus a
// SHORT code that the power-switch model reports if both pMOS switches are on.
// The APSC state enum lists the five states of the per-sub-block controller.
package fifo_pkg;
  timeunit 1ns; timeprecision 1ps;

  // Cell supply seen by a sub-block.
  typedef enum logic [1:0] {
    VCS_OFF   = 2'd0,  // power gated, data lost
    VCS_LOW   = 2'd1,  // VDDL, sub-threshold, data kept
    VCS_HIGH  = 2'd2,  // VDDH, near-threshold, data kept
    VCS_SHORT = 2'd3   // both switches on: VDDH shorted to VDDL
  } vcs_e;

  // States of the adaptive power switch control of one sub-block.
  typedef enum logic [2:0] {
    APSC_FLOAT = 3'd0,  // Floating mode: both switches off
    APSC_LOW   = 3'd1,  // Low-power mode: MPL on
    APSC_WAIT  = 3'd2,  // break-before-make gap before MPH turns on
    APSC_TYP   = 3'd3,  // Typical mode: MPH on
    APSC_DSCH  = 3'd4   // discharge nMOS pulls VCS down before floating
  } apsc_state_e;

endpackage
