// Error decoder of the self-calibrating track-and-hold ADC.
//
// The analog front end delivers four comparator outputs: the static pair
// st_h/st_l (signal above +kVq2 / below -kVq2) and the dynamic pair dy_h/dy_l
// that compare the amplified error with a window that the sample-and-hold
// circuits re-centre after every crossing. Each crossing of the upper window
// edge (dy_h rising) adds one to the error e_t, each crossing of the lower edge
// (dy_l falling, dy_l being high while the signal is above the lower edge) takes
// one away. The count is kept in thermometer code in a shift register, so an
// update moves a single bit and a capture in the middle of an update is never
// more than one step off. Whenever the static comparators report the zero-error
// bin (neither st_h nor st_l) the register is reset to the zero code: this is
// the self-calibration that clears accumulated quantisation error. A
// thermometer-to-binary encoder and an output register then deliver the signed
// error e[n] in the system clock domain. The static comparators also give a
// three-level error of their own (+1, 0, -1 in steps of Vq2) that serves in
// steady state: outside the zero bin e[n] is the dynamic count when that count
// has the sign the static comparators report, and the static +-1 otherwise.
// This keeps e[n] pointing towards the zero bin even after the count has
// saturated or lost steps, so the loop always returns to the zero bin where
// the count is recalibrated.
//
// Following the design: the up/down thermometer register, the zero-bin reset
// and the encoder with output latches, a static error for steady state and a
// dynamic one for transients. This implementation's own choices: the rule
// that merges the static and dynamic errors; the
// comparator outputs are brought into the clk domain by a two-flop
// synchroniser and edge detection instead of clocking the register
// asynchronously (the clock is far faster than the 15 ns conversion time, so
// no event is lost); the register has LEVELS cells (default 64), which bounds
// e[n] to +-LEVELS/2.
//
// Timing: a comparator edge reaches e_out 4 clk cycles later (2 synchroniser,
// 1 shift register, 1 output latch). e_zero mirrors the zero-bin flag with the
// same synchroniser delay.
module adc_error_decoder #(
  parameter int unsigned LEVELS = 64,
  parameter int unsigned EW     = $clog2(LEVELS) + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 st_h,     // static comparator: error above +kVq2
  input  logic                 st_l,     // static comparator: error below -kVq2
  input  logic                 dy_h,     // dynamic comparator: above upper window edge
  input  logic                 dy_l,     // dynamic comparator: above lower window edge
  output logic signed [EW-1:0] e_out,    // e[n], signed, LSB = Vq1
  output logic signed [1:0]    e_static, // three-level static error (+1, 0, -1)
  output logic                 e_zero    // inside the zero-error bin
);
  timeunit 1ns; timeprecision 1ps;

  logic [1:0] sync_sth, sync_stl, sync_dyh, sync_dyl;
  logic       dyh_q, dyl_q;
  logic       inc, dec, zero_bin;
  logic [LEVELS-1:0] thermo;
  localparam logic [LEVELS-1:0] THERMO_ZERO = {{(LEVELS/2){1'b0}}, {(LEVELS/2){1'b1}}};

  // Two-flop synchronisers for the asynchronous comparator outputs.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync_sth <= '0; sync_stl <= '0; sync_dyh <= '0; sync_dyl <= 2'b11;
      dyh_q    <= 1'b0; dyl_q <= 1'b1;
    end else begin
      sync_sth <= {sync_sth[0], st_h};
      sync_stl <= {sync_stl[0], st_l};
      sync_dyh <= {sync_dyh[0], dy_h};
      sync_dyl <= {sync_dyl[0], dy_l};
      dyh_q    <= sync_dyh[1];
      dyl_q    <= sync_dyl[1];
    end
  end

  assign inc      =  sync_dyh[1] & ~dyh_q;   // signal crossed the upper edge
  assign dec      = ~sync_dyl[1] &  dyl_q;   // signal crossed the lower edge
  assign zero_bin = ~sync_sth[1] & ~sync_stl[1];

  // Thermometer-code up/down shift register with zero-bin reset.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)               thermo <= THERMO_ZERO;
    else if (zero_bin)        thermo <= THERMO_ZERO;
    else if (inc && !dec)     thermo <= {thermo[LEVELS-2:0], 1'b1};
    else if (dec && !inc)     thermo <= {1'b0, thermo[LEVELS-1:1]};
  end

  // Thermometer-to-binary encoder and output latches.
  function automatic logic signed [EW-1:0] thermo2bin(input logic [LEVELS-1:0] t);
    logic signed [EW:0] n;
    n = '0;
    for (int i = 0; i < LEVELS; i++) n = n + (EW+1)'(t[i]);
    return EW'(n - (EW+1)'(LEVELS/2));
  endfunction

  // Output: the static three-level error in steady state, the dynamic count
  // during transients. Outside the zero bin the count is used when it agrees
  // in sign with the static comparators, otherwise the static +-1.
  logic signed [EW-1:0] e_dyn, e_sel;
  always_comb begin
    e_dyn = thermo2bin(thermo);
    if (zero_bin)         e_sel = '0;
    else if (sync_sth[1]) e_sel = (e_dyn > 0) ? e_dyn : EW'(1);
    else                  e_sel = (e_dyn < 0) ? e_dyn : -EW'(1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e_out    <= '0;
      e_static <= '0;
      e_zero   <= 1'b1;
    end else begin
      e_out    <= e_sel;
      e_static <= sync_sth[1] ? 2'sd1 : (sync_stl[1] ? -2'sd1 : 2'sd0);
      e_zero   <= zero_bin;
    end
  end

endmodule
