// Minimum-deviation digital controller for single- and two-phase buck
// converters.
//
// In steady state the controller is a voltage-mode digital PWM regulator: the
// track-and-hold ADC turns vref - vout into the error e[n], the PID computes
// the duty ratio d[n] and the DPWM produces the switch commands c1/c2. On a
// load step the inductor current reconstruction logic takes over: it keeps
// the main switches on (or off) until the output-voltage valley (or peak)
// shows that the inductor current has reached the new load, then emits one
// short switching sequence built from the captured duty ratio (DT/2 on,
// (1-D)T off, or (1-D)T/2 off) that leaves the inductor current with the
// ripple and DC value of the new steady state, and hands back to the PID,
// which then only has to restore the capacitor charge. A small self-learning
// table corrects the captured duty ratio for converter losses.
//
// Blocks: adc_frontend_model (analog part of the ADC, behavioural),
// adc_error_decoder, valley_point_detector, pid_compensator, dpwm,
// current_reconstruction_logic and duty_ratio_corrector. An off-chip
// RC-matched transient detector for high-ESR capacitors can replace the
// ADC-based detection: with ext_det_en set its three comparator outputs
// (ext_lohi, ext_hilo, ext_valley, synchronised here; ext_lohi is low while
// the output is below the lower threshold) trigger the transient modes and mark the extreme point (rising edge of ext_valley: valley, falling
// edge: peak), and the ADC's own extreme-point detection is blanked.
//
// The analog inputs vout_uv and vref_uv are signed integers in microvolts,
// standing in for the two analog pins. clk runs at 2^DW times the switching
// frequency (4.096 GHz for 500 kHz and 13 bits).
module mdc_top
  import mdc_pkg::*;
#(
  parameter int unsigned DW      = DPWM_BITS,
  parameter int unsigned LEVELS  = 64,
  parameter int unsigned EW      = ERR_BITS,
  parameter int unsigned TW      = 16,
  parameter int unsigned ABITS   = 3,
  parameter int unsigned T_SHIFT = 11,
  parameter int unsigned FRAC    = 6,
  parameter int          KP      = 320,
  parameter int          KI      = 128,
  parameter int          KD      = 2560,
  parameter int          ADC_K   = 5,
  parameter int          VQ1_UV  = 4000,
  parameter int          VQ2_UV  = 8000
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  int                   vout_uv,     // converter output voltage (analog)
  input  int                   vref_uv,     // reference voltage (analog)
  input  logic                 supp_en,     // enable transient suppression
  input  logic                 dual_en,     // dual-extreme point sequence
  input  logic                 two_phase,   // drive a two-phase converter
  input  logic                 corr_en,     // enable duty ratio correction
  input  logic signed [EW-1:0] e_lohi,      // nominal light-to-heavy threshold
  input  logic signed [EW-1:0] e_hilo,      // nominal heavy-to-light threshold
  input  logic                 ext_det_en,  // use the external ESR detector
  input  logic                 ext_lohi,    // vout above vc1 - dVth (low = LoHi transient)
  input  logic                 ext_hilo,    // vout above vc1 + dVth (HiLo transient)
  input  logic                 ext_valley,  // vout above vc1
  output logic [1:0]           c,           // c1(t), c2(t)
  output mdc_state_e           state,
  output logic                 tr_mode,
  output logic signed [EW-1:0] e_n,         // e[n]
  output logic        [DW-1:0] d_n,         // d[n]
  output logic        [DW-1:0] d_est,
  output logic                 valley_point,
  output logic                 peak_point,
  output logic                 dpwm_restart,
  output logic                 corr_wr,
  output logic                 e_zero,      // ADC in its zero-error bin
  output logic signed [1:0]    e_static,    // static comparator decision
  output logic        [EW-1:0] thr          // adaptive threshold used in S2
);
  timeunit 1ns; timeprecision 1ps;

  logic st_h, st_l, dy_h, dy_l;
  logic adc_valley, adc_peak;
  logic [1:0] sw_on, sw_off;
  logic [DW-1:0] dpwm_restart_val, d_old, d_steady, d_int;
  logic [TW-1:0] t_meas;
  logic hl, corr_rd, period_start;
  logic [1:0] ext_lohi_s, ext_hilo_s;
  logic [2:0] ext_valley_s;

  adc_frontend_model #(.K(ADC_K), .VQ1_UV(VQ1_UV), .VQ2_UV(VQ2_UV)) u_adc_fe (
    .vout_uv, .vref_uv, .st_h, .st_l, .dy_h, .dy_l
  );

  adc_error_decoder #(.LEVELS(LEVELS), .EW(EW)) u_adc_dec (
    .clk, .rst_n, .st_h, .st_l, .dy_h, .dy_l,
    .e_out(e_n), .e_static, .e_zero
  );

  valley_point_detector #(.EW(EW)) u_vpd (
    .clk, .rst_n, .e_in(e_n), .valley_point(adc_valley), .peak_point(adc_peak)
  );

  // External detector: synchronise and edge-detect; blank the ADC's points.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ext_lohi_s <= '1; ext_hilo_s <= '0; ext_valley_s <= '0;
    end else begin
      ext_lohi_s   <= {ext_lohi_s[0], ext_lohi};
      ext_hilo_s   <= {ext_hilo_s[0], ext_hilo};
      ext_valley_s <= {ext_valley_s[1:0], ext_valley};
    end
  end
  assign valley_point = ext_det_en ? (ext_valley_s[1] & ~ext_valley_s[2]) : adc_valley;
  assign peak_point   = ext_det_en ? (~ext_valley_s[1] & ext_valley_s[2]) : adc_peak;

  current_reconstruction_logic #(.DW(DW), .EW(EW), .TW(TW)) u_crl (
    .clk, .rst_n, .supp_en, .dual_en, .two_phase,
    .e_in(e_n), .e_lohi, .e_hilo, .valley_point, .peak_point,
    .ext_lohi(ext_det_en & ~ext_lohi_s[1]), .ext_hilo(ext_det_en & ext_hilo_s[1]),
    .d_pid(d_int), .d_est, .state, .tr_mode, .sw_on, .sw_off,
    .dpwm_restart, .dpwm_restart_val, .d_old, .d_steady, .t_meas, .hl,
    .corr_rd, .corr_wr, .thr
  );

  duty_ratio_corrector #(.DW(DW), .TW(TW), .ABITS(ABITS), .T_SHIFT(T_SHIFT)) u_drc (
    .clk, .rst_n, .corr_en, .t_meas, .hl, .d_old, .rd(corr_rd), .wr(corr_wr),
    .d_new(d_int), .d_est
  );

  pid_compensator #(.DW(DW), .EW(EW), .FRAC(FRAC), .KP(KP), .KI(KI), .KD(KD)) u_pid (
    .clk, .rst_n, .sample(period_start), .e_in(e_n), .tr_mode, .d_steady,
    .d_out(d_n), .d_int
  );

  dpwm #(.DW(DW)) u_dpwm (
    .clk, .rst_n, .d_in(d_n), .two_phase, .sw_on, .sw_off,
    .restart(dpwm_restart), .restart_val(dpwm_restart_val),
    .c, .period_start
  );

endmodule
