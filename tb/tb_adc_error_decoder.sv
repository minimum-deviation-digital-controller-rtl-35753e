// Testbench for adc_error_decoder (error decoder of the track-and-hold ADC).
//
// Drives the four comparator inputs directly, as the analog front end would:
// static comparators st_h / st_l select the sign, every rising edge of dy_h
// is one step up and every falling edge of dy_l one step down. Checks, with
// random step counts:
//  - the zero bin (both static comparators low) gives e = 0 and e_zero, and
//    resets the shift register (self-calibration);
//  - N up steps give e = +N, then M down steps give e = N - M;
//  - the count saturates at +-LEVELS/2;
//  - a count that disagrees in sign with the static comparators is replaced
//    by the static +-1;
//  - the latency from a dy_h edge to the new e_out is 4 clk cycles
//    (two synchroniser stages, edge detection / shift, output latch);
//  - e_static follows the static comparators.
// Own choices: clock period 1 ns; comparator pulses 3 cycles wide.
module tb_adc_error_decoder;
  timeunit 1ns; timeprecision 1ps;

  localparam int LEVELS = 64;
  localparam int EW     = 7;
  localparam int LAT    = 4;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic st_h = 1'b0, st_l = 1'b0, dy_h = 1'b0, dy_l = 1'b1;
  logic signed [EW-1:0] e_out;
  logic signed [1:0]    e_static;
  logic                 e_zero;

  always #0.5 clk = ~clk;

  adc_error_decoder #(.LEVELS(LEVELS), .EW(EW)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (t=%0t)", msg, $time);
    end
  endtask

  task automatic up(input int n);
    repeat (n) begin
      @(negedge clk) dy_h = 1'b1;
      repeat (3) @(negedge clk);
      dy_h = 1'b0;
      repeat (3) @(negedge clk);
    end
  endtask

  task automatic down(input int n);
    repeat (n) begin
      @(negedge clk) dy_l = 1'b0;
      repeat (3) @(negedge clk);
      dy_l = 1'b1;
      repeat (3) @(negedge clk);
    end
  endtask

  task automatic settle();
    repeat (8) @(negedge clk);
  endtask

  task automatic to_zero();
    @(negedge clk) begin st_h = 1'b0; st_l = 1'b0; end
    settle();
    check(e_out == 0 && e_zero && e_static == 0, "zero bin gives e = 0");
  endtask

  initial begin
    #100000;
    $display("FAIL: watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, m, lat;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    settle();
    check(e_out == 0 && e_zero, "reset state");

    for (int k = 0; k < 20; k++) begin
      n = 1 + int'($urandom_range(0, 24));
      m = int'($urandom_range(0, n - 1));
      // Positive error: upper static comparator on.
      @(negedge clk) st_h = 1'b1;
      settle();
      check(e_out == 1 && e_static == 1 && !e_zero, "static +1 before any step");
      up(n);
      settle();
      check(e_out == EW'(n), $sformatf("after %0d up steps", n));
      down(m);
      settle();
      check(e_out == EW'(n - m), $sformatf("after %0d up, %0d down steps", n, m));
      to_zero();
      // Negative error: lower static comparator on, count down.
      @(negedge clk) st_l = 1'b1;
      settle();
      check(e_out == -1 && e_static == -1, "static -1 before any step");
      down(n);
      settle();
      check(e_out == -EW'(n), $sformatf("after %0d down steps", n));
      to_zero();
    end

    // Saturation at +LEVELS/2.
    @(negedge clk) st_h = 1'b1;
    up(LEVELS / 2 + 8);
    settle();
    check(e_out == EW'(LEVELS / 2), "count saturates at LEVELS/2");
    to_zero();

    // Disagreeing sign: count down while the static says positive.
    @(negedge clk) st_h = 1'b1;
    down(5);
    settle();
    check(e_out == 1, "count of wrong sign replaced by static +1");
    to_zero();

    // Latency of one step.
    @(negedge clk) st_h = 1'b1;
    up(3);
    settle();
    @(negedge clk) dy_h = 1'b1;
    lat = 0;
    while (e_out != 4 && lat < 20) begin
      @(posedge clk);
      lat++;
      #0.1;
    end
    check(lat == LAT, $sformatf("step latency %0d clk (expected %0d)", lat, LAT));
    @(negedge clk) dy_h = 1'b0;
    to_zero();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
