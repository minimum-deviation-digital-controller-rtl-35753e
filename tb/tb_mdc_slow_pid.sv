// Closed-loop testbench of the duty ratio corrector with a slow PID
// compensator, at the default sizes (13-bit DPWM, 500 kHz, 4.096 GHz clock).
//
// With a slow compensator the duty ratio captured before a light-to-heavy
// step is the one of the light load, which is smaller than the heavy-load
// value because of the conduction losses; the reconstruction then leaves a
// larger residual error. The duty ratio corrector learns the pair (D_old,
// D_new) and, on the next identical step, replaces the captured value. The
// test applies a 5->30 A step with the suppression logic and the corrector
// disabled, then teaches the corrector the same step and repeats it. It checks
// that the output returns to regulation after every step, that the corrector
// wrote its table and its value was used, and that the deviation of the
// corrected step is smaller than that of the uncorrected one.
// Own choices: a 5->30 A step instead of 0 A to 90 % load (the model needs a
// small load to stay in continuous conduction); the slow PID keeps Kp=5 and
// Kd=40 and cuts Ki from 2 to 1/2, so that the integrator, which supplies
// D_old, lags the load; thresholds of +-12 error LSB, 0.5 mOhm ESR, 400
// switching periods per step, an output within 25 mV of 1.8 V at the end of
// each step. About 5.5 ms of converter time are simulated (roughly 15 s of
// simulator run time); +trace prints one line per switching period.
module tb_mdc_slow_pid;
  timeunit 1ns; timeprecision 1ps;
  import mdc_pkg::*;

  localparam int  T    = 1 << DPWM_BITS;
  localparam real VREF = 1.8;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #0.122 clk = ~clk;

  logic supp_en = 1'b0, corr_en = 1'b0;
  logic signed [ERR_BITS-1:0] e_lohi = 7'sd12, e_hilo = -7'sd12;
  logic [1:0] c;
  mdc_state_e state;
  logic tr_mode, valley_point, peak_point, dpwm_restart, corr_wr, e_zero;
  logic signed [ERR_BITS-1:0] e_n;
  logic [DPWM_BITS-1:0] d_n, d_est;
  logic [ERR_BITS-1:0] thr;

  real  i_load = 0.0, vout, i_l1, i_l2;
  real  vref_now = 0.0;
  logic plant_init = 1'b1;
  logic det_lohi, det_hilo, det_valley;
  int   vout_uv;
  assign vout_uv = int'(vout * 1.0e6);

  mdc_top #(.KP(320), .KI(32), .KD(2560)) dut (
    .clk, .rst_n, .vout_uv, .vref_uv(int'(vref_now * 1.0e6)),
    .supp_en, .dual_en(1'b0), .two_phase(1'b0), .corr_en, .e_lohi, .e_hilo,
    .ext_det_en(1'b0), .ext_lohi(det_lohi), .ext_hilo(det_hilo), .ext_valley(det_valley),
    .c, .state, .tr_mode, .e_n, .d_n, .d_est, .valley_point, .peak_point,
    .dpwm_restart, .corr_wr, .e_zero, .thr
  );

  buck_plant_model plant (
    .clk, .c, .two_phase(1'b0), .i_load_a(i_load), .esr_ohm(0.5e-3), .v_init(0.0),
    .init(plant_init), .vout, .i_l1, .i_l2, .det_lohi, .det_hilo, .det_valley
  );

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  int  n_corr_wr = 0, n_corr_applied = 0, n_lh2 = 0;
  real maxdev = 0.0;
  mdc_state_e prev_state = ST_S1;
  bit  trace = 1'b0;
  initial trace = $test$plusargs("trace");

  always @(posedge clk) if (rst_n) begin
    real dev;
    dev = (vout > vref_now) ? vout - vref_now : vref_now - vout;
    if (dev > maxdev) maxdev = dev;
    if (corr_wr) n_corr_wr++;
    if (trace && dut.u_dpwm.period_start)
      $display("trace t=%0t vout=%7.4f il=%6.2f e=%0d d=%0d st=%s", $time, vout, i_l1, e_n, d_n, state.name());
    if (state != prev_state) begin
      if (trace)
        $display("state t=%0t %s->%s vout=%7.4f e=%0d d=%0d d_est=%0d", $time,
                 prev_state.name(), state.name(), vout, e_n, d_n, d_est);
      if (state == ST_LH2) begin
        n_lh2++;
        if (corr_en && d_est != d_n) n_corr_applied++;
      end
      prev_state <= state;
    end
  end

  task automatic run_periods(input int n);
    repeat (n * T) @(posedge clk);
  endtask

  task automatic step(input real new_load, input int periods, input string name,
                      output real dev);
    maxdev = 0.0;
    i_load = new_load;
    run_periods(periods);
    dev = maxdev;
    $display("%-24s load %5.1f A: max deviation %6.1f mV, vout %7.4f V, d=%0d state=%s",
             name, new_load, dev * 1.0e3, vout, d_n, state.name());
    check((vout > VREF - 0.025) && (vout < VREF + 0.025), {name, ": output regulated"});
    check(!tr_mode, {name, ": back in steady state"});
  endtask

  real dev_nc, dev_c, dev;

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    plant_init = 1'b0;
    for (int k = 1; k <= 150 * T / 64; k++) begin
      vref_now = VREF * k / (150.0 * T / 64);
      repeat (64) @(posedge clk);
    end
    i_load = 5.0;
    run_periods(300);
    check((vout > VREF - 0.02) && (vout < VREF + 0.02), "start-up regulated");

    supp_en = 1'b1;
    step(30.0, 400, "uncorrected, 5->30 A", dev_nc);
    step(5.0, 400, "uncorrected, 30->5 A", dev);
    corr_en = 1'b1;
    step(30.0, 400, "learning, 5->30 A", dev);
    step(5.0, 400, "learning, 30->5 A", dev);
    check(n_corr_wr > 0, "corrector table written");
    step(30.0, 400, "corrected, 5->30 A", dev_c);
    step(5.0, 400, "corrected, 30->5 A", dev);
    check(n_corr_applied > 0, "corrected duty ratio used");
    check(dev_c < dev_nc, "correction reduces the deviation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3200 * T) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
