// Testbench for current_reconstruction_logic (transient suppression modes).
//
// Runs the block with an 8-bit period (T = 256 clk) and drives e[n], the
// valley / peak point pulses and the external detector inputs directly. With
// D = d_est = 100 it checks the switch override sequences cycle by cycle:
//  - S1 -> LH1 when e reaches e_lohi: all main switches on;
//  - valley point -> LH2: main switch on for D*T/2 = 50 cycles, then off for
//    (1-D)*T = 156 cycles, then S2 with one DPWM restart pulse (value 0);
//  - S1 -> HL1 at e_hilo: switches off; peak point -> HL2: off for a further
//    (1-D)*T/2 = 78 cycles;
//  - two phases, light-to-heavy: the lagging phase is off for 78 cycles from
//    the valley point while the leading phase runs its 50 / 156 sequence;
//  - dual-extreme: after the 50 on-cycles the switch stays off until the peak
//    point, then 78 more cycles;
//  - S2 uses the captured extreme error as threshold (no trigger below it, a
//    new LH1 above it), S2 -> S1 when e = 0;
//  - corr_rd at each extreme point and corr_wr after RECOVER_PER periods of
//    zero error in S1; tr_mode high exactly in LH1/LH2/HL1/HL2;
//  - direct LH1 <-> HL1 reversals keep the first captured D_old;
//  - the external detector triggers from S1; nothing triggers with supp_en low.
// Own choices: clock period 1 ns; the reduced period keeps the run short.
module tb_current_reconstruction_logic;
  timeunit 1ns; timeprecision 1ps;
  import mdc_pkg::*;

  localparam int DW = 8, EW = 7, TW = 16, RECOVER_PER = 4;
  localparam int T = 1 << DW, D = 100;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic supp_en = 1'b1, dual_en = 1'b0, two_phase = 1'b0;
  logic signed [EW-1:0] e_in = '0, e_lohi = 7'sd6, e_hilo = -7'sd6;
  logic valley_point = 1'b0, peak_point = 1'b0, ext_lohi = 1'b0, ext_hilo = 1'b0;
  logic [DW-1:0] d_pid = DW'(D), d_est = DW'(D);
  mdc_state_e state;
  logic tr_mode, dpwm_restart, hl, corr_rd, corr_wr;
  logic [1:0] sw_on, sw_off;
  logic [DW-1:0] dpwm_restart_val, d_old, d_steady;
  logic [TW-1:0] t_meas;
  logic [EW-1:0] thr;

  int n_restart = 0, n_rd = 0, n_wr = 0;

  always #0.5 clk = ~clk;

  current_reconstruction_logic #(.DW(DW), .EW(EW), .TW(TW), .RECOVER_PER(RECOVER_PER)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (t=%0t)", msg, $time);
    end
  endtask

  always @(negedge clk) if (rst_n) begin
    check(tr_mode == (state inside {ST_LH1, ST_LH2, ST_HL1, ST_HL2}), "tr_mode matches state");
    if (dpwm_restart) n_restart++;
    if (corr_rd) n_rd++;
    if (corr_wr) n_wr++;
  end

  // Counts consecutive cycles (sampled at negedges) with the signal high.
  task automatic run_of(input bit on, input int ph, output int n);
    n = 0;
    while ((on ? sw_on[ph] : sw_off[ph]) && n < 4 * T) begin
      n++;
      @(negedge clk);
    end
  endtask

  // The error is moved back towards zero as the output recovers, so that
  // the new S2 threshold is not exceeded at the end of the sequence.
  task automatic pulse_valley();
    @(negedge clk) valley_point = 1'b1;
    @(negedge clk) begin valley_point = 1'b0; e_in = 7'sd1; end
  endtask

  task automatic pulse_peak();
    @(negedge clk) peak_point = 1'b1;
    @(negedge clk) begin peak_point = 1'b0; e_in = -7'sd1; end
  endtask

  task automatic back_to_s1();
    @(negedge clk) e_in = '0;
    @(negedge clk);
    @(negedge clk);
    check(state == ST_S1, "S2 -> S1 when e = 0");
  endtask

  initial begin
    #300000;
    $display("FAIL: watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_on, n_off, r0, w0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    check(state == ST_S1 && sw_on == 0 && sw_off == 0, "idle in S1");

    // ---- Light-to-heavy, single phase.
    e_in = 7'sd5;
    repeat (3) @(negedge clk);
    check(state == ST_S1, "below e_lohi: no trigger");
    e_in = 7'sd6;
    @(negedge clk);
    check(state == ST_LH1 && sw_on == 2'b01 && d_old == DW'(D), "S1 -> LH1 at e_lohi, switch on, D_old captured");
    e_in = 7'sd9;
    repeat (20) @(negedge clk);
    r0 = n_restart;
    pulse_valley();
    check(state == ST_LH2, "valley -> LH2");
    run_of(1'b1, 0, n_on);
    check(n_on == D / 2, $sformatf("on time %0d (D*T/2 = %0d)", n_on, D / 2));
    run_of(1'b0, 0, n_off);
    check(n_off == T - D, $sformatf("off time %0d ((1-D)*T = %0d)", n_off, T - D));
    check(state == ST_S2 && dpwm_restart_val == 0, "LH2 -> S2, DPWM restart value 0");
    @(negedge clk);
    check(n_restart == r0 + 1 && n_rd == 1, "one DPWM restart and one corrector read");
    check(thr == 9, "S2 threshold = captured extreme error");

    // ---- S2: adaptive threshold.
    e_in = 7'sd8;
    repeat (5) @(negedge clk);
    check(state == ST_S2, "in S2 an error below the new threshold does not trigger");
    e_in = 7'sd9;
    @(negedge clk);
    check(state == ST_LH1, "in S2 an error at the new threshold triggers LH1");
    pulse_valley();
    run_of(1'b1, 0, n_on);
    run_of(1'b0, 0, n_off);
    back_to_s1();

    // ---- Corrector update after recovery.
    w0 = n_wr;
    repeat (RECOVER_PER * T + 10) @(negedge clk);
    check(n_wr == w0 + 1, "corr_wr after the recovery wait");

    // ---- Heavy-to-light, single phase.
    @(negedge clk) e_in = -7'sd7;
    @(negedge clk);
    check(state == ST_HL1 && sw_off == 2'b01 && hl, "S1 -> HL1 at e_hilo, switch off");
    repeat (30) @(negedge clk);
    pulse_peak();
    check(state == ST_HL2, "peak -> HL2");
    run_of(1'b0, 0, n_off);
    check(n_off == (T - D) / 2, $sformatf("HL2 off time %0d ((1-D)*T/2 = %0d)", n_off, (T - D) / 2));
    check(state == ST_S2, "HL2 -> S2");
    back_to_s1();

    // ---- Two phases, light-to-heavy.
    two_phase = 1'b1;
    @(negedge clk) e_in = 7'sd10;
    @(negedge clk);
    check(sw_on == 2'b11, "LH1 turns both phases on");
    repeat (10) @(negedge clk);
    pulse_valley();
    begin
      int c_on0 = 0, c_off1 = 0, c_off0 = 0;
      while (state == ST_LH2) begin
        if (sw_on[0]) c_on0++;
        if (sw_off[1]) c_off1++;
        if (sw_off[0]) c_off0++;
        @(negedge clk);
      end
      check(c_on0 == D / 2, $sformatf("leading phase on %0d", c_on0));
      check(c_off0 == T - D, $sformatf("leading phase off %0d", c_off0));
      check(c_off1 == (T - D) / 2, $sformatf("lagging phase off %0d ((1-D)*T/2)", c_off1));
    end
    back_to_s1();
    two_phase = 1'b0;

    // ---- Dual-extreme sequence.
    dual_en = 1'b1;
    @(negedge clk) e_in = 7'sd10;
    repeat (10) @(negedge clk);
    pulse_valley();
    run_of(1'b1, 0, n_on);
    check(n_on == D / 2, "dual: on time D*T/2");
    repeat (60) @(negedge clk);
    check(sw_off[0] && state == ST_LH2, "dual: switch off while waiting for the peak");
    pulse_peak();
    run_of(1'b0, 0, n_off);
    check(n_off == (T - D) / 2, $sformatf("dual: off %0d after the peak ((1-D)*T/2)", n_off));
    check(state == ST_S2, "dual: sequence done");
    back_to_s1();
    dual_en = 1'b0;

    // ---- Direct reversals LH1 -> HL1 -> LH1, D_old kept from the first capture.
    @(negedge clk) e_in = 7'sd7;
    @(negedge clk);
    check(state == ST_LH1, "LH1 before reversal");
    d_pid = DW'(D + 20);
    e_in  = -7'sd6;
    @(negedge clk);
    check(state == ST_HL1 && sw_off == 2'b01 && d_old == DW'(D), "LH1 -> HL1 reversal keeps D_old");
    e_in = 7'sd6;
    @(negedge clk);
    check(state == ST_LH1 && sw_on == 2'b01, "HL1 -> LH1 reversal");
    d_pid = DW'(D);
    pulse_valley();
    run_of(1'b1, 0, n_on);
    run_of(1'b0, 0, n_off);
    back_to_s1();

    // ---- External detector and disabled suppression.
    @(negedge clk) ext_lohi = 1'b1;
    @(negedge clk) ext_lohi = 1'b0;
    check(state == ST_LH1, "external detector triggers LH1");
    pulse_valley();
    run_of(1'b1, 0, n_on);
    run_of(1'b0, 0, n_off);
    back_to_s1();
    supp_en = 1'b0;
    @(negedge clk) e_in = 7'sd20;
    repeat (10) @(negedge clk);
    check(state == ST_S1 && !tr_mode, "no suppression when disabled");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
