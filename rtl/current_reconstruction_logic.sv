// Inductor current reconstruction logic (transient suppression mode control).
//
// Steady state (S1): the PID regulates. When the error e[n] = vref - vout
// reaches e_lohi (output dropped: light-to-heavy load step) the logic enters
// LH1 and turns all main switches on; when it falls to e_hilo (output rose:
// heavy-to-light) it enters HL1 and turns them all off. In both cases the duty
// ratio D_old = d[n] of the PID is captured first and the ramp time of the
// inductor current (t_cr or t_cf) is counted in clk cycles.
//
// The ramp ends at the output-voltage extreme point, where the capacitor
// current is zero and the inductor current equals the new load. The duty ratio
// to reconstruct is then D = d_est (D_old plus the corrector's loss-related
// increment for this ramp time), and, with T = 2^DW clk cycles per period:
//   LH2, single phase : on for D*T/2, then off for (1-D)*T
//   LH2, dual-extreme : on for D*T/2, off until the following output peak,
//                       then off for (1-D)*T/2
//   LH2, two phases   : leading phase as above; lagging phase off for
//                       (1-D)*T/2 from the valley point
//   HL2               : every phase off for a further (1-D)*T/2
// The first phase to finish its sequence restarts the DPWM counter at its own
// period start (0 for phase 1, T/2 for phase 2), so the regular pulses resume
// exactly where the reconstructed waveform leaves off; a phase still in its
// sequence keeps its override until its own timer ends. When every phase is
// released the PID takes over again, preset to d_steady = d_est, in state S2.
//
// In S2 the trigger threshold is the error magnitude captured at the extreme
// point, so small follow-up disturbances do not re-enter suppression mode;
// larger ones do (S2 -> LH1 / HL1). The ext_lohi / ext_hilo inputs let an
// external transient detector trigger the same transitions from S1 (in S2
// only the raised error threshold re-triggers, since the detector's window is
// fixed). When e[n] returns to zero the logic goes
// back to S1 with the nominal thresholds; once e[n] has then stayed at zero
// for RECOVER_PER switching periods (the output is fully recovered and the PID
// has settled) the duty ratio corrector is told to store D_new - D_old for the
// transient just handled. A new transient before that replaces the pending
// update with its own.
//
// Following the design: the states and their transitions, the times DT/2,
// (1-D)T and (1-D)T/2, the dual-extreme sequence, the two-phase sequence, the
// adaptive threshold and the duty ratio capture. This implementation's
// choices: the counter restart that re-aligns the DPWM; a timeout of one
// switching period T on the wait for the dual-extreme peak point (the
// quantized error needs a full 4 mV step after the peak to show it, so the
// peak is seen well after it happens); the recovery wait of
// RECOVER_PER periods before the table update; the heavy-to-light
// two-phase sequence (not specified beyond the single-phase one); the
// direct LH1 <-> HL1 reversals keep the D_old of the first capture; the
// external detector triggers only from S1.
// Timing: all outputs are registered or decoded from registers; a trigger
// condition on e_in acts on the switches one clk cycle later.
module current_reconstruction_logic
  import mdc_pkg::*;
#(
  parameter int unsigned DW = DPWM_BITS,
  parameter int unsigned EW = ERR_BITS,
  parameter int unsigned TW = 16,
  parameter int unsigned RECOVER_PER = 16   // periods of zero error before a table update
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 supp_en,      // suppression logic enabled
  input  logic                 dual_en,      // dual-extreme point sequence
  input  logic                 two_phase,    // two-phase interleaved converter
  input  logic signed [EW-1:0] e_in,         // e[n]
  input  logic signed [EW-1:0] e_lohi,       // light-to-heavy threshold (> 0)
  input  logic signed [EW-1:0] e_hilo,       // heavy-to-light threshold (< 0)
  input  logic                 valley_point,
  input  logic                 peak_point,
  input  logic                 ext_lohi,     // external detector: light-to-heavy
  input  logic                 ext_hilo,     // external detector: heavy-to-light
  input  logic        [DW-1:0] d_pid,        // d[n] of the PID
  input  logic        [DW-1:0] d_est,        // d_est[n] of the corrector
  output mdc_state_e           state,
  output logic                 tr_mode,
  output logic [1:0]           sw_on,
  output logic [1:0]           sw_off,
  output logic                 dpwm_restart,
  output logic        [DW-1:0] dpwm_restart_val,
  output logic        [DW-1:0] d_old,        // D_old[n]
  output logic        [DW-1:0] d_steady,     // d_steady[n] to the PID
  output logic        [TW-1:0] t_meas,       // t_cr[n] / t_cf[n]
  output logic                 hl,           // transient type for the corrector
  output logic                 corr_rd,
  output logic                 corr_wr,
  output logic        [EW-1:0] thr           // active threshold magnitude in S2
);
  timeunit 1ns; timeprecision 1ps;

  typedef enum logic [1:0] {PH_IDLE, PH_ON, PH_OFF, PH_WAITPK} ph_mode_e;

  localparam logic [DW:0]   PERIOD = (DW+1)'(1) << DW;
  localparam logic [DW-1:0] HALF   = DW'(1) << (DW-1);

  ph_mode_e        ph_mode [2];
  logic [DW:0]     ph_tmr  [2];
  logic [DW-1:0]   d_rec;       // D used for the reconstruction sequence
  logic            restarted;
  logic            pending;     // a corrector update is owed
  logic signed [EW-1:0] e_ext;  // extreme error of the current ramp
  logic [1:0]      ph_en;
  logic [DW:0]     t_off_full, t_off_half;
  localparam int unsigned RW = DW + $clog2(RECOVER_PER + 1) + 1;
  localparam logic [RW-1:0] RECOVER_CYC = RW'(RECOVER_PER) << DW;
  logic [RW-1:0]   rec_cnt;     // zero-error time in S1 before the update

  assign ph_en      = {two_phase, 1'b1};
  assign tr_mode    = (state != ST_S1) && (state != ST_S2);
  assign t_off_full = PERIOD - (DW+1)'(d_rec);
  assign t_off_half = t_off_full >> 1;

  always_comb begin
    for (int i = 0; i < 2; i++) begin
      sw_on[i]  = 1'b0;
      sw_off[i] = 1'b0;
      if (ph_en[i]) begin
        unique case (state)
          ST_LH1: sw_on[i]  = 1'b1;
          ST_HL1: sw_off[i] = 1'b1;
          ST_LH2, ST_HL2: begin
            sw_on[i]  = (ph_mode[i] == PH_ON);
            sw_off[i] = (ph_mode[i] == PH_OFF) || (ph_mode[i] == PH_WAITPK);
          end
          default: ;
        endcase
      end
    end
  end

  function automatic logic [EW-1:0] mag(input logic signed [EW-1:0] v);
    return (v < 0) ? EW'(-v) : EW'(v);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state            <= ST_S1;
      d_old            <= '0;
      d_steady         <= '0;
      d_rec            <= '0;
      t_meas           <= '0;
      hl               <= 1'b0;
      corr_rd          <= 1'b0;
      corr_wr          <= 1'b0;
      thr              <= '0;
      e_ext            <= '0;
      restarted        <= 1'b0;
      pending          <= 1'b0;
      rec_cnt          <= '0;
      dpwm_restart     <= 1'b0;
      dpwm_restart_val <= '0;
      for (int i = 0; i < 2; i++) begin
        ph_mode[i] <= PH_IDLE;
        ph_tmr[i]  <= '0;
      end
    end else begin
      corr_rd      <= 1'b0;
      corr_wr      <= 1'b0;
      dpwm_restart <= 1'b0;
      if (t_meas != '1) t_meas <= t_meas + 1'b1;

      unique case (state)
        ST_S1, ST_S2: begin
          // Corrector update once the output has stayed recovered.
          if (state == ST_S1 && pending) begin
            if (e_in != 0) rec_cnt <= '0;
            else if (rec_cnt == RECOVER_CYC - 1) begin
              corr_wr <= 1'b1;
              pending <= 1'b0;
            end else rec_cnt <= rec_cnt + 1'b1;
          end
          if (state == ST_S2 && e_in == 0) begin
            state   <= ST_S1;
            rec_cnt <= '0;
          end else if (supp_en && ((state == ST_S1 && ext_lohi) ||
                       ((state == ST_S1) ? (e_in >= e_lohi)
                                         : (e_in >= $signed({1'b0, thr[EW-2:0]}))))) begin
            state    <= ST_LH1;
            hl       <= 1'b0;
            d_old    <= d_pid;
            d_steady <= d_pid;
            t_meas   <= '0;
            e_ext    <= e_in;
          end else if (supp_en && ((state == ST_S1 && ext_hilo) ||
                       ((state == ST_S1) ? (e_in <= e_hilo)
                                         : (e_in <= -$signed({1'b0, thr[EW-2:0]}))))) begin
            state    <= ST_HL1;
            hl       <= 1'b1;
            d_old    <= d_pid;
            d_steady <= d_pid;
            t_meas   <= '0;
            e_ext    <= e_in;
          end
        end

        ST_LH1: begin
          if (e_in > e_ext) e_ext <= e_in;
          if (valley_point) begin
            state     <= ST_LH2;
            corr_rd   <= 1'b1;
            pending   <= 1'b1;
            d_rec     <= d_est;
            d_steady  <= d_est;
            thr       <= (mag(e_ext) > mag(e_lohi)) ? mag(e_ext) : mag(e_lohi);
            restarted <= 1'b0;
            ph_mode[0] <= PH_ON;
            ph_tmr[0]  <= (DW+1)'(d_est >> 1);
            ph_mode[1] <= two_phase ? PH_OFF : PH_IDLE;
            ph_tmr[1]  <= (PERIOD - (DW+1)'(d_est)) >> 1;
          end else if (e_in <= e_hilo) begin
            state  <= ST_HL1;
            hl     <= 1'b1;
            t_meas <= '0;
            e_ext  <= e_in;
          end
        end

        ST_HL1: begin
          if (e_in < e_ext) e_ext <= e_in;
          if (peak_point) begin
            state     <= ST_HL2;
            corr_rd   <= 1'b1;
            pending   <= 1'b1;
            d_rec     <= d_est;
            d_steady  <= d_est;
            thr       <= (mag(e_ext) > mag(e_hilo)) ? mag(e_ext) : mag(e_hilo);
            restarted <= 1'b0;
            for (int i = 0; i < 2; i++) begin
              ph_mode[i] <= ph_en[i] ? PH_OFF : PH_IDLE;
              ph_tmr[i]  <= (PERIOD - (DW+1)'(d_est)) >> 1;
            end
          end else if (e_in >= e_lohi) begin
            state  <= ST_LH1;
            hl     <= 1'b0;
            t_meas <= '0;
            e_ext  <= e_in;
          end
        end

        ST_LH2, ST_HL2: begin
          // Per-phase sequence engine. The first phase to end restarts the
          // DPWM at that phase's period start.
          automatic logic done_any = 1'b0;
          automatic logic all_idle = 1'b1;
          for (int i = 0; i < 2; i++) begin
            automatic logic fin = 1'b0;
            unique case (ph_mode[i])
              PH_ON: begin
                if (ph_tmr[i] <= 1) begin
                  if (dual_en && state == ST_LH2 && i == 0) begin
                    ph_mode[i] <= PH_WAITPK;
                    ph_tmr[i]  <= PERIOD;
                  end else begin
                    ph_mode[i] <= PH_OFF;
                    ph_tmr[i]  <= t_off_full;
                  end
                end else ph_tmr[i] <= ph_tmr[i] - 1'b1;
                all_idle = 1'b0;
              end
              PH_WAITPK: begin
                if (peak_point || ph_tmr[i] <= 1) begin
                  ph_mode[i] <= PH_OFF;
                  ph_tmr[i]  <= t_off_half;
                end else ph_tmr[i] <= ph_tmr[i] - 1'b1;
                all_idle = 1'b0;
              end
              PH_OFF: begin
                if (ph_tmr[i] <= 1) begin
                  ph_mode[i] <= PH_IDLE;
                  fin = 1'b1;
                end else begin
                  ph_tmr[i] <= ph_tmr[i] - 1'b1;
                  all_idle = 1'b0;
                end
              end
              default: ;
            endcase
            if (fin && !restarted && !done_any) begin
              done_any         = 1'b1;
              dpwm_restart     <= 1'b1;
              dpwm_restart_val <= (i == 0) ? '0 : HALF;
            end
          end
          if (done_any) restarted <= 1'b1;
          if (all_idle) state <= ST_S2;
        end

        default: state <= ST_S1;
      endcase
    end
  end

endmodule
