// Valley / peak point detector.
//
// The extreme points of the output voltage are found where the derivative of
// the ADC error e[n] changes sign. With e = vref - vout, an output-voltage
// valley is a maximum of e and an output-voltage peak is a minimum of e. The
// detector remembers the direction of the last change of e[n]; when e[n] moves
// against that direction it reports an extreme point for one clock cycle:
// valley_point when a rise is followed by a fall, peak_point when a fall is
// followed by a rise. Because e[n] is quantised, the report comes when the
// signal has moved one quantisation step back from the extreme, which is the
// detection delay analysed for this controller.
//
// The sign-change rule is the design's; the one-cycle pulse outputs, the
// direction register and its reset value are this implementation's choices.
// Timing: the pulse is registered, one clk after the e_in change that reveals
// the extreme.
module valley_point_detector #(
  parameter int unsigned EW = 7
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [EW-1:0] e_in,
  output logic                 valley_point,  // vout minimum passed (e maximum)
  output logic                 peak_point     // vout maximum passed (e minimum)
);
  timeunit 1ns; timeprecision 1ps;

  typedef enum logic [1:0] {DIR_NONE, DIR_UP, DIR_DOWN} dir_e;

  logic signed [EW-1:0] e_prev;
  dir_e                 dir;
  logic                 rising, falling;

  assign rising  = e_in > e_prev;
  assign falling = e_in < e_prev;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e_prev       <= '0;
      dir          <= DIR_NONE;
      valley_point <= 1'b0;
      peak_point   <= 1'b0;
    end else begin
      e_prev       <= e_in;
      valley_point <= falling && (dir == DIR_UP);
      peak_point   <= rising  && (dir == DIR_DOWN);
      if (rising)       dir <= DIR_UP;
      else if (falling) dir <= DIR_DOWN;
    end
  end

endmodule
