// Self-adjusting duty ratio corrector.
//
// In a lossy converter the steady-state duty ratio grows with load, so the
// duty ratio captured before a load step (D_old) is not the one needed after
// it. The corrector learns that difference. The measured inductor current
// rise time t_cr (light-to-heavy) or fall time t_cf (heavy-to-light) stands
// for the size of the load step; it is truncated to a few bits and, together
// with the transient direction hl, addresses a small table of duty ratio
// increments. Reading: d_est = D_old + delta_d[addr] (saturated to the duty
// range) is the estimate the suppression logic uses for its switching
// sequence. Writing: once the output has recovered, the table entry of the
// last transient is overwritten with D_new - D_old, where D_new is the PID
// output in the new steady state.
//
// Following the design: truncation, the table addressed by t_cr/t_cf and h/l,
// the adder for d_est and the subtractor for the update. This
// implementation's choices: the truncation keeps bits
// [T_SHIFT +: ABITS] of the time and saturates larger values to the top
// entry; 2 x 2^ABITS entries (default 2 x 8); the table starts at zero after
// reset; separate rd/wr strobes stand for the read/write input, and the
// address and D_old of the last read are held for the later write.
// corr_en = 0 bypasses the table (d_est = D_old).
// Timing: d_est is combinational from t_meas, hl and d_old; rd and wr take
// effect on the next clk edge.
module duty_ratio_corrector #(
  parameter int unsigned DW      = 13,  // duty ratio width
  parameter int unsigned TW      = 16,  // measured time width (clk cycles)
  parameter int unsigned ABITS   = 3,   // table address bits per direction
  parameter int unsigned T_SHIFT = 11   // truncation: LSBs dropped from t
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          corr_en,
  input  logic [TW-1:0] t_meas,  // t_cr[n] or t_cf[n]
  input  logic          hl,      // 1: heavy-to-light transient, 0: light-to-heavy
  input  logic [DW-1:0] d_old,   // D_old[n]
  input  logic          rd,      // transient measured: latch address and D_old
  input  logic          wr,      // output recovered: store D_new - D_old
  input  logic [DW-1:0] d_new,   // D_new[n]
  output logic [DW-1:0] d_est    // d_est[n]
);
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned ENTRIES = 2 << ABITS;
  localparam int          XW      = DW + 2;   // signed delta width

  logic signed [XW-1:0] lut [ENTRIES];
  logic [ABITS:0]       addr, addr_q;
  logic [DW-1:0]        d_old_q;
  logic signed [XW-1:0] sum, delta;
  logic [TW-1:0]        t_sh;

  // Truncation with saturation.
  assign t_sh = t_meas >> T_SHIFT;
  assign addr = {hl, (t_sh > TW'((1 << ABITS) - 1)) ? ABITS'((1 << ABITS) - 1)
                                                    : t_sh[ABITS-1:0]};

  always_comb begin
    delta = corr_en ? lut[addr] : '0;
    sum   = XW'({1'b0, d_old}) + delta;
    if (sum < 0)                         d_est = '0;
    else if (sum > XW'((1 << DW) - 1))   d_est = '1;
    else                                 d_est = sum[DW-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr_q  <= '0;
      d_old_q <= '0;
      for (int i = 0; i < ENTRIES; i++) lut[i] <= '0;
    end else begin
      if (rd) begin
        addr_q  <= addr;
        d_old_q <= d_old;
      end
      if (wr) lut[addr_q] <= XW'({1'b0, d_new}) - XW'({1'b0, d_old_q});
    end
  end

endmodule
