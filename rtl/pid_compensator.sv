// Steady-state PID compensator.
//
// A conventional discrete PID in positional form, evaluated once per
// switching period (sample strobe from the DPWM):
//   i[n] = i[n-1] + KI*e[n]
//   u[n] = i[n] + KP*e[n] + KD*(e[n] - e[n-1])
// The coefficients are signed integers scaled by 2^FRAC; i and u carry FRAC
// fractional bits and are saturated to [D_MIN, D_MAX]. The integer part of u
// drives the DPWM as d[n]. The integer part of the integrator, d_int, is the
// compensator's estimate of the steady-state duty ratio: it is free of the
// proportional and derivative excursions that the quantized error causes, so
// the suppression logic reads it as D_old before a transient and as D_new
// after recovery.
// While tr_mode is high (transient suppression active) the compensator does
// not regulate: the integrator is preset to d_steady (the duty ratio estimate
// of the suppression logic) and the error history follows the present error,
// so that when control is handed back the PID resumes from the new
// steady-state duty ratio without a derivative kick.
//
// The design specifies a PID whose output d[n] feeds the DPWM and which takes
// d_steady[n] and tr_mode from the suppression logic; its internal
// architecture and gains are not given. The positional form, the use of the
// integrator as the duty estimate, the gains and the saturation limits are
// this implementation's choices. The default gains (Kp = 5, Ki = 2, Kd = 40
// duty LSB per error LSB) were set against a 12 V to 1.8 V, 0.47 uH / 400 uF
// buck with e[n] in 4 mV steps and a 13-bit DPWM.
// Only the integer part of u is used: its FRAC fraction bits and the guard
// bits above DW (always zero after saturation) are not read, which the lint
// reports as unused bits of u.
// Timing: d_out and d_int are registered and change one clk after a sample
// strobe (or the clk after tr_mode rises).
module pid_compensator #(
  parameter int unsigned DW    = 13,   // duty ratio resolution
  parameter int unsigned EW    = 7,    // error width
  parameter int unsigned FRAC  = 6,    // fractional bits of the coefficients
  parameter int          KP    = 320,  // Kp * 2^FRAC
  parameter int          KI    = 128,  // Ki * 2^FRAC
  parameter int          KD    = 2560, // Kd * 2^FRAC
  parameter int unsigned D_MIN = 0,
  parameter int unsigned D_MAX = (1 << DW) - 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 sample,    // once per switching period
  input  logic signed [EW-1:0] e_in,      // e[n]
  input  logic                 tr_mode,   // suppression logic active
  input  logic        [DW-1:0] d_steady,  // preset value while tr_mode
  output logic        [DW-1:0] d_out,     // d[n] to the DPWM
  output logic        [DW-1:0] d_int      // integrator (steady-state duty)
);
  timeunit 1ns; timeprecision 1ps;

  localparam int AW = DW + FRAC + 4;
  localparam logic signed [AW-1:0] U_MIN = AW'(signed'(D_MIN) <<< FRAC);
  localparam logic signed [AW-1:0] U_MAX = AW'(signed'(D_MAX) <<< FRAC);

  logic signed [AW-1:0] acc, acc_next, u, u_next;
  logic signed [EW-1:0] e1;

  function automatic logic signed [AW-1:0] sat(input logic signed [AW-1:0] v);
    if (v > U_MAX)      return U_MAX;
    else if (v < U_MIN) return U_MIN;
    else                return v;
  endfunction

  always_comb begin
    acc_next = sat(acc + AW'(KI) * AW'(e_in));
    u_next   = sat(acc_next + AW'(KP) * AW'(e_in)
                   + AW'(KD) * (AW'(e_in) - AW'(e1)));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0;
      u   <= '0;
      e1  <= '0;
    end else if (tr_mode) begin
      acc <= AW'({1'b0, d_steady}) <<< FRAC;
      u   <= AW'({1'b0, d_steady}) <<< FRAC;
      e1  <= e_in;
    end else if (sample) begin
      acc <= acc_next;
      u   <= u_next;
      e1  <= e_in;
    end
  end

  assign d_out = u[FRAC +: DW];
  assign d_int = acc[FRAC +: DW];

endmodule
