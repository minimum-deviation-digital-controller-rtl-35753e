// Behavioural model of a one- or two-phase synchronous buck power stage, for
// closed-loop simulation of the controller.
//
// Each clk cycle advances a switching (not averaged) model by DT_S seconds:
// every phase has an inductor L with series loss resistance R_L, driven to
// VIN when its command c[i] is high and to ground when it is low (the
// synchronous rectifier conducts both current directions). The phase currents
// charge the output capacitor C, whose ESR (esr_ohm) adds to the output voltage. The
// load is an ideal current sink i_load_a set by the testbench. The model also
// produces the signals of an RC-matched transient detector: the capacitor
// voltage vc (what a matched R1C1 copy would show) and its three comparator
// outputs against a threshold window of +-DV_TH.
// Defaults: 12 V input, 0.47 uH per phase, 400 uF; the ESR is an input.
module buck_plant_model #(
  parameter real VIN   = 12.0,
  parameter real L     = 0.47e-6,
  parameter real C     = 400e-6,
  parameter real R_L   = 8e-3,
  parameter real DT_S  = 1.0 / (500.0e3 * 8192.0),
  parameter real DV_TH = 0.012
) (
  input  logic       clk,
  input  logic [1:0] c,
  input  logic       two_phase,
  input  real        i_load_a,
  input  real        esr_ohm,    // output capacitor ESR
  input  real        v_init,
  input  logic       init,       // load v_init and the matching currents
  output real        vout,
  output real        i_l1,
  output real        i_l2,
  output logic       det_lohi,   // vout above vc - DV_TH
  output logic       det_hilo,   // vout above vc + DV_TH
  output logic       det_valley  // vout above vc
);
  timeunit 1ns; timeprecision 1ps;

  real vc;
  real i_sum;

  assign i_sum      = i_l1 + (two_phase ? i_l2 : 0.0);
  assign vout       = vc + esr_ohm * (i_sum - i_load_a);
  assign det_lohi   = vout > vc - DV_TH;
  assign det_hilo   = vout > vc + DV_TH;
  assign det_valley = vout > vc;

  always @(posedge clk) begin
    if (init) begin
      vc   <= v_init;
      i_l1 <= two_phase ? i_load_a / 2.0 : i_load_a;
      i_l2 <= two_phase ? i_load_a / 2.0 : 0.0;
    end else begin
      i_l1 <= i_l1 + ((c[0] ? VIN : 0.0) - vout - R_L * i_l1) / L * DT_S;
      i_l2 <= two_phase ? i_l2 + ((c[1] ? VIN : 0.0) - vout - R_L * i_l2) / L * DT_S : 0.0;
      vc   <= vc + (i_sum - i_load_a) / C * DT_S;
    end
  end

endmodule
