// End-to-end closed-loop testbench of the minimum-deviation controller, at the
// default parameters (13-bit DPWM, 500 kHz switching, 4.096 GHz clock).
//
// The controller regulates a behavioural buck power stage (12 V to 1.8 V,
// 0.47 uH per phase, 400 uF). The test walks through: start-up and a load step
// with the suppression logic disabled (conventional PID control), light-to-
// heavy and heavy-to-light steps with the suppression logic, steps repeated
// once the duty ratio corrector has learned, two successive steps, the
// dual-extreme point sequence, two-phase interleaved operation, and transient
// detection by the external RC-matched detector. It checks that the output
// returns to regulation after every step, that the reconstruction sequence
// times are DT/2 on and (1-D)T off (or (1-D)T/2 off for heavy-to-light), that
// the suppression logic reduces the deviation compared with plain PID control,
// and it counts how often each mechanism happened; a mechanism that never
// happened counts as a failure.
// Own choices: trigger thresholds of +-12 error LSB (48 mV), an output within
// 25 mV of 1.8 V and back in S1/S2 200 switching periods after each step, a
// soft-start ramp of vref, 5 A minimum load, 2 mOhm ESR for the external
// detector runs. About 8 ms of converter time are simulated (roughly 15 s of
// simulator run time). +trace prints one line per switching period and each
// mode change; +quick stops after the PID-only steps.
module tb_mdc_top;
  timeunit 1ns; timeprecision 1ps;
  import mdc_pkg::*;

  localparam int  T     = 1 << DPWM_BITS;   // clk cycles per switching period
  localparam real VREF  = 1.8;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #0.122 clk = ~clk;

  logic supp_en = 1'b0, dual_en = 1'b0, two_phase = 1'b0, corr_en = 1'b0;
  logic ext_det_en = 1'b0;
  logic signed [ERR_BITS-1:0] e_lohi = 7'sd12, e_hilo = -7'sd12;
  logic [1:0] c;
  mdc_state_e state;
  logic tr_mode, valley_point, peak_point, dpwm_restart, corr_wr, e_zero;
  logic signed [ERR_BITS-1:0] e_n;
  logic [DPWM_BITS-1:0] d_n, d_est;
  logic [ERR_BITS-1:0] thr;

  real  i_load = 0.0, v_init = 0.0, vout, i_l1, i_l2;
  real  vref_now = 0.0;
  real  esr = 0.5e-3;   // soft-start ramp of the reference
  logic plant_init = 1'b1;
  logic det_lohi, det_hilo, det_valley;
  int   vout_uv;
  assign vout_uv = int'(vout * 1.0e6);

  mdc_top dut (
    .clk, .rst_n, .vout_uv, .vref_uv(int'(vref_now * 1.0e6)),
    .supp_en, .dual_en, .two_phase, .corr_en, .e_lohi, .e_hilo,
    .ext_det_en, .ext_lohi(det_lohi), .ext_hilo(det_hilo), .ext_valley(det_valley),
    .c, .state, .tr_mode, .e_n, .d_n, .d_est, .valley_point, .peak_point,
    .dpwm_restart, .corr_wr, .e_zero, .thr
  );

  buck_plant_model plant (
    .clk, .c, .two_phase, .i_load_a(i_load), .esr_ohm(esr), .v_init, .init(plant_init),
    .vout, .i_l1, .i_l2, .det_lohi, .det_hilo, .det_valley
  );

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  // ---------------------------------------------------------------- monitors
  mdc_state_e prev_state = ST_S1;
  int n_lh1 = 0, n_hl1 = 0, n_lh2 = 0, n_hl2 = 0, n_s2 = 0, n_s1_ret = 0;
  int n_retrig = 0, n_corr_wr = 0, n_corr_applied = 0, n_dual_peak = 0;
  int n_restart = 0, n_ext_trig = 0, n_conv_big_err = 0, n_zero_reset = 0;
  int n_c2_pulses = 0, n_reversal = 0;
  int seq_on = 0, seq_off = 0, seq_d = 0, n_seq_ok = 0, n_seq_bad = 0;
  bit seq_hl = 1'b0, seq_track = 1'b0;
  real maxdev = 0.0;
  bit  trace = 1'b0;
  initial trace = $test$plusargs("trace");
  logic c1_q = 1'b0, e_zero_q = 1'b1;

  always @(posedge clk) if (rst_n) begin
    real dev;
    dev = (vout > vref_now) ? vout - vref_now : vref_now - vout;
    if (dev > maxdev) maxdev = dev;
    c1_q     <= c[1];
    e_zero_q <= e_zero;
    if (c[1] && !c1_q) n_c2_pulses++;
    if (trace && dut.u_dpwm.period_start)
      $display("trace t=%0t vout=%7.4f il=%6.2f e=%0d d=%0d st=%s kv=%0d h=%0d l=%0d sth=%0b stl=%0b", $time, vout, i_l1, e_n, d_n, state.name(), dut.u_adc_fe.kv, dut.u_adc_fe.v_dyn_h, dut.u_adc_fe.v_dyn_l, dut.u_adc_fe.st_h, dut.u_adc_fe.st_l);
    if (e_zero && !e_zero_q) n_zero_reset++;
    if (corr_wr) n_corr_wr++;
    if (dpwm_restart) n_restart++;
    if (!supp_en && state == ST_S1 && e_n >= e_lohi) n_conv_big_err++;
    if (state == ST_LH2 && dual_en && dut.u_crl.ph_mode[0] == 2'd3 && peak_point) n_dual_peak++;
    // Reconstruction sequence timing of phase 1 (single phase, no dual).
    if (seq_track) begin
      if (dut.u_crl.sw_on[0])  seq_on++;
      if (dut.u_crl.sw_off[0]) seq_off++;
    end
    if (state != prev_state) begin
      if (trace)
        $display("state t=%0t %s->%s vout=%7.4f e=%0d d=%0d d_est=%0d t_meas=%0d ext=%0b",
                 $time, prev_state.name(), state.name(), vout, e_n, d_n, d_est, dut.u_crl.t_meas, ext_det_en);
      if (state == ST_LH1) begin
        n_lh1++;
        if (ext_det_en && dut.u_crl.ext_lohi && e_n < e_lohi) n_ext_trig++;
        if (prev_state == ST_S2) n_retrig++;
        if (prev_state == ST_HL1) n_reversal++;
      end
      if (state == ST_HL1) begin
        n_hl1++;
        if (ext_det_en && dut.u_crl.ext_hilo && e_n > e_hilo) n_ext_trig++;
        if (prev_state == ST_S2) n_retrig++;
        if (prev_state == ST_LH1) n_reversal++;
      end
      if (state == ST_LH2 || state == ST_HL2) begin
        if (state == ST_LH2) n_lh2++; else n_hl2++;
        if (d_est != d_n) n_corr_applied++;
        seq_d = int'(dut.u_crl.d_rec);
        seq_hl = (state == ST_HL2);
        seq_on = 0; seq_off = 0;
        seq_track = !two_phase && !dual_en;
        if (seq_track) begin
          if (dut.u_crl.sw_on[0])  seq_on++;
          if (dut.u_crl.sw_off[0]) seq_off++;
        end
      end
      if ((prev_state == ST_LH2 || prev_state == ST_HL2) && seq_track) begin
        seq_track = 1'b0;
        if (seq_hl ? (seq_on == 0 && seq_off == (T - seq_d) / 2)
                   : (seq_on == seq_d / 2 && seq_off == T - seq_d)) n_seq_ok++;
        else begin
          n_seq_bad++;
          $display("sequence timing: D=%0d on=%0d off=%0d hl=%0b", seq_d, seq_on, seq_off, seq_hl);
        end
      end
      if (state == ST_S2) n_s2++;
      if (state == ST_S1 && prev_state == ST_S2) n_s1_ret++;
      prev_state <= state;
    end
  end

  // ------------------------------------------------------------------- tasks
  task automatic run_periods(input int n);
    repeat (n * T) @(posedge clk);
  endtask

  // Apply a load step, run, and check that the output is regulated again.
  task automatic step(input real new_load, input int periods, input string name,
                      output real dev);
    maxdev = 0.0;
    i_load = new_load;
    run_periods(periods);
    dev = maxdev;
    $display("%-28s load %5.1f A: max deviation %6.1f mV, vout %7.4f V, d=%0d state=%s",
             name, new_load, dev * 1.0e3, vout, d_n, state.name());
    check((vout > VREF - 0.025) && (vout < VREF + 0.025), {name, ": output regulated"});
    check(!tr_mode, {name, ": back in steady state"});
  endtask

  real dev_conv, dev_md, dev;

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    plant_init = 1'b0;

    // Soft start (reference ramp over 150 periods), then 5 A load, PID alone.
    for (int k = 1; k <= 150 * T / 64; k++) begin
      vref_now = VREF * k / (150.0 * T / 64);
      repeat (64) @(posedge clk);
    end
    i_load = 5.0;
    run_periods(150);
    check((vout > VREF - 0.02) && (vout < VREF + 0.02), "start-up regulated");
    step(25.0, 200, "PID only, 5->25 A", dev_conv);
    if ($test$plusargs("quick")) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
    step(5.0, 200, "PID only, 25->5 A", dev);
    check(n_lh1 == 0 && n_hl1 == 0, "no suppression while disabled");

    // Suppression logic with duty ratio correction.
    supp_en = 1'b1; corr_en = 1'b1;
    step(25.0, 200, "suppression, 5->25 A", dev);
    step(5.0, 200, "suppression, 25->5 A", dev);
    step(25.0, 200, "corrected, 5->25 A", dev_md);
    step(5.0, 200, "corrected, 25->5 A", dev);
    check(dev_md < dev_conv, "suppression reduces the deviation");

    // Two successive light-to-heavy steps.
    step(12.0, 12, "successive, 5->12 A", dev);
    step(30.0, 200, "successive, 12->30 A", dev);
    step(5.0, 200, "back to 5 A", dev);

    // Dual-extreme point sequence.
    dual_en = 1'b1;
    step(25.0, 200, "dual-extreme, 5->25 A", dev);
    step(5.0, 200, "dual-extreme, 25->5 A", dev);
    dual_en = 1'b0;

    // Two-phase interleaved operation.
    two_phase = 1'b1;
    run_periods(300);
    step(30.0, 200, "two-phase, 5->30 A", dev);
    step(5.0, 200, "two-phase, 30->5 A", dev);
    two_phase = 1'b0;
    run_periods(200);

    // External RC-matched transient detector, with a four times larger ESR.
    esr = 2.0e-3;
    run_periods(100);
    ext_det_en = 1'b1;
    step(25.0, 200, "external detector, 5->25 A", dev);
    step(5.0, 200, "external detector, 25->5 A", dev);
    // Dual-extreme sequence with the detector's capacitor-current zero
    // crossing as peak point.
    dual_en = 1'b1;
    step(25.0, 200, "ext. detector dual, 5->25 A", dev);
    step(5.0, 200, "ext. detector dual, 25->5 A", dev);
    dual_en = 1'b0;
    ext_det_en = 1'b0;

    $display("events: LH1=%0d HL1=%0d LH2=%0d HL2=%0d S2=%0d S2->S1=%0d retrigger=%0d reversal=%0d",
             n_lh1, n_hl1, n_lh2, n_hl2, n_s2, n_s1_ret, n_retrig, n_reversal);
    $display("events: corr_wr=%0d corr_applied=%0d dual_peak=%0d restart=%0d ext=%0d conv=%0d zero_reset=%0d c2=%0d seq_ok=%0d",
             n_corr_wr, n_corr_applied, n_dual_peak, n_restart, n_ext_trig, n_conv_big_err,
             n_zero_reset, n_c2_pulses, n_seq_ok);
    check(n_lh1 > 0,  "light-to-heavy ramp happened");
    check(n_hl1 > 0,  "heavy-to-light ramp happened");
    check(n_lh2 > 0,  "light-to-heavy reconstruction happened");
    check(n_hl2 > 0,  "heavy-to-light reconstruction happened");
    check(n_s2 > 0 && n_s1_ret > 0, "adaptive-threshold state S2 entered and left");
    check(n_retrig > 0, "re-trigger from S2 happened");
    check(n_corr_wr > 0, "corrector table updated");
    check(n_corr_applied > 0, "corrected duty ratio applied");
    check(n_dual_peak > 0, "dual-extreme peak detection happened");
    check(n_restart > 0, "DPWM re-aligned after reconstruction");
    check(n_ext_trig > 0, "external detector triggered a transient");
    check(n_conv_big_err > 0, "large error handled by the PID alone");
    check(n_zero_reset > 0, "ADC zero-bin self-calibration happened");
    check(n_c2_pulses > 0, "phase 2 switched");
    check(n_seq_ok > 0 && n_seq_bad == 0, "reconstruction times DT/2, (1-D)T, (1-D)T/2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog.
  initial begin
    repeat (6000 * T) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
