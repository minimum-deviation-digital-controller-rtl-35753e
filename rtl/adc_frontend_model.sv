// Behavioural model (not synthesizable) of the analog front end of the
// self-calibrating track-and-hold ADC: differential preamplifier, static error
// generator and dynamic error generator.
//
// The preamplifier forms kv = K*(vref - vout). The static error generator
// compares kv with +-K*Vq2 taken from a resistive divider and drives st_h/st_l.
// The dynamic error generator keeps a tracking window v_dyn_l < kv < v_dyn_h of
// half-width K*Vq1 around the signal: two comparators give dy_h (kv above the
// upper edge) and dy_l (kv above the lower edge); whenever kv leaves the window
// the hold signal is released, and after the sample-and-hold settling time
// T_TSH the two S/H circuits capture kv +- K*Vq1 from the dynamic voltage
// reference generator, so the window moves in staircase steps of K*Vq1 that
// follow the signal. The digital error decoder counts those steps.
//
// Analog voltages are carried as signed integers in microvolts. K = 5 and
// Vq1 = 4 mV are the design's figures; Vq2 = 8 mV is this model's choice (the
// design only requires Vq1 < Vq2); comparator delay is neglected, the
// S/H settling delay T_TSH (2 ns) is modelled. The sign of kv follows the
// amplifier's pin polarity (positive when vout is below vref), which makes the
// error positive for a light-to-heavy load step.
module adc_frontend_model #(
  parameter int  K      = 5,
  parameter int  VQ1_UV = 4000,
  parameter int  VQ2_UV = 8000,
  parameter time T_TSH  = 2ns
) (
  input  int   vout_uv,  // converter output voltage, microvolts
  input  int   vref_uv,  // reference voltage, microvolts
  output logic st_h,     // kv above +K*Vq2
  output logic st_l,     // kv below -K*Vq2
  output logic dy_h,     // kv above the upper edge of the tracking window
  output logic dy_l      // kv above the lower edge of the tracking window
);
  timeunit 1ns; timeprecision 1ps;

  int   kv;
  int   v_dyn_h;
  int   v_dyn_l;
  logic hold_n;

  assign kv     = K * (vref_uv - vout_uv);
  assign st_h   = kv >  K * VQ2_UV;
  assign st_l   = kv < -K * VQ2_UV;
  assign dy_h   = kv > v_dyn_h;
  assign dy_l   = kv > v_dyn_l;
  // hold is released while the signal is outside the window.
  assign hold_n = dy_h | ~dy_l;

  // The window starts centred on zero error.
  initial begin
    v_dyn_h = K * VQ1_UV;
    v_dyn_l = -K * VQ1_UV;
  end

  always @(posedge hold_n) begin
    #(T_TSH);
    v_dyn_h <= kv + K * VQ1_UV;
    v_dyn_l <= kv - K * VQ1_UV;
  end

endmodule
