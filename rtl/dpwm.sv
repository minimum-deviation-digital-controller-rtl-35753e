// Dual-output interleaved digital pulse-width modulator.
//
// A DW-bit period counter runs on clk, so one switching period is 2^DW clock
// cycles (500 kHz with a 4.096 GHz clock at the default 13 bits). Phase 1 is
// a trailing-edge modulator: c[0] is high while cnt < d. Phase 2 is the same
// modulator shifted by half a period, high while (cnt - 2^(DW-1)) mod 2^DW < d,
// and is used only when two_phase is set. Each phase latches d[n] at the start
// of its own period, so a new duty ratio never cuts a pulse short.
// The suppression logic overrides the outputs per phase: sw_on forces the main
// switch on, sw_off forces it off (synchronous rectifier on). It can also
// restart the counter at a chosen value (restart/restart_val) when it hands
// control back, so that the regular pulses continue seamlessly from the
// switching sequence it has just produced. period_start is high for one cycle
// whenever the counter is at zero; it is the PID sampling strobe.
//
// The design gives a 13-bit, 500 kHz, dual-output DPWM driven by d[n] with
// sw.on/sw.off inputs; its prototype uses a hybrid counter/delay-line
// structure that is not described. This implementation is counter-only, so it
// needs a clock of 2^DW times the switching frequency; the counter restart
// port is this implementation's way of re-aligning the DPWM after a
// transient.
// Timing: outputs are registered; c follows the counter with one cycle of
// latency.
module dpwm #(
  parameter int unsigned DW = 13
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [DW-1:0] d_in,        // d[n] from the PID
  input  logic          two_phase,   // enable phase 2
  input  logic [1:0]    sw_on,       // per-phase force on
  input  logic [1:0]    sw_off,      // per-phase force off
  input  logic          restart,     // load the counter
  input  logic [DW-1:0] restart_val,
  output logic [1:0]    c,           // c1(t), c2(t): main switch commands
  output logic          period_start
);
  timeunit 1ns; timeprecision 1ps;

  localparam logic [DW-1:0] HALF = DW'(1) << (DW-1);

  logic [DW-1:0] cnt, d1, d2, cnt2;
  logic          pwm1, pwm2;

  assign cnt2         = cnt - HALF;
  assign period_start = (cnt == '0);
  assign pwm1         = cnt  < d1;
  assign pwm2         = two_phase && (cnt2 < d2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      d1  <= '0;
      d2  <= '0;
      c   <= '0;
    end else begin
      cnt <= restart ? restart_val : cnt + 1'b1;
      // Latch the duty ratio at each phase's period start (or on a restart).
      if (restart || cnt == '1)        d1 <= d_in;
      if (restart || cnt == HALF - 1)  d2 <= d_in;
      c[0] <= sw_on[0] | (~sw_off[0] & pwm1);
      c[1] <= two_phase & (sw_on[1] | (~sw_off[1] & pwm2));
    end
  end

endmodule
