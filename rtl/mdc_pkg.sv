// Shared constants and types of the minimum-deviation controller.
//
// The controller has two modes: a steady state in which a PID compensator
// drives a voltage-mode DPWM, and a transient suppression mode in which the
// inductor current reconstruction logic takes over the switches. The mode
// controller's states follow the state diagram of the design (S1, S2 in steady
// state; LH1/LH2 for light-to-heavy and HL1/HL2 for heavy-to-light load
// steps). The 13-bit DPWM resolution is the design's own figure; the error
// word width follows from the 32-level tracking window chosen for the ADC,
// which is this implementation's choice (64 levels, e in -32..+32).
// The constants are used as parameter defaults by the modules that import
// the package; a lint of the package on its own reports them as unused.
package mdc_pkg;
  timeunit 1ns; timeprecision 1ps;

  // DPWM / duty-ratio resolution (13 bits).
  parameter int unsigned DPWM_BITS = 13;
  // Signed width of the ADC error word e[n].
  parameter int unsigned ERR_BITS  = 7;

  typedef enum logic [2:0] {
    ST_S1  = 3'd0,  // steady state, nominal thresholds
    ST_S2  = 3'd1,  // steady state, shifted thresholds after a transient
    ST_LH1 = 3'd2,  // light-to-heavy: inductor current ramp (main switches on)
    ST_LH2 = 3'd3,  // light-to-heavy: current reconstruction
    ST_HL1 = 3'd4,  // heavy-to-light: inductor current fall (main switches off)
    ST_HL2 = 3'd5   // heavy-to-light: current reconstruction
  } mdc_state_e;

endpackage
