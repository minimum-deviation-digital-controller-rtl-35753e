// Testbench for dpwm (dual-output interleaved DPWM), default 13 bits.
//
// Checks over several switching periods with random duty ratios:
//  - period_start pulses exactly every 2^DW clk cycles (500 kHz at 4.096 GHz);
//  - c[0] is high for exactly d cycles per period, starting at the period
//    start (trailing-edge modulation);
//  - with two_phase, c[1] is high for d cycles starting half a period later;
//    without it c[1] stays low;
//  - sw_on / sw_off force each output on / off;
//  - restart loads the counter: the next period start follows after
//    2^DW - restart_val cycles.
// Own choices: clock period 1 ns; duty ratios drawn from 1 .. 2^DW - 2.
module tb_dpwm;
  timeunit 1ns; timeprecision 1ps;

  localparam int DW = 13, T = 1 << DW, HALF = T / 2;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [DW-1:0] d_in = '0, restart_val = '0;
  logic two_phase = 1'b0, restart = 1'b0;
  logic [1:0] sw_on = '0, sw_off = '0, c;
  logic period_start;

  always #0.5 clk = ~clk;

  dpwm #(.DW(DW)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (t=%0t)", msg, $time);
    end
  endtask

  // Measures one period from a period_start: high counts and first-high
  // offsets of both outputs.
  task automatic measure(output int hi0, output int hi1, output int first1, output int len);
    hi0 = 0; hi1 = 0; first1 = -1; len = 0;
    @(negedge clk);
    while (!period_start) @(negedge clk);
    do begin
      @(negedge clk);
      // c is registered: it describes the counter value one cycle earlier.
      if (c[0]) hi0++;
      if (c[1]) begin
        hi1++;
        if (first1 < 0) first1 = len;
      end
      len++;
    end while (!period_start);
  endtask

  initial begin
    #1000000;
    $display("FAIL: watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int hi0, hi1, first1, len, d;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 12; k++) begin
      d = int'($urandom_range(1, T - 2));
      two_phase = k[0];
      @(negedge clk) d_in = DW'(d);
      measure(hi0, hi1, first1, len);     // period that latches the new d
      measure(hi0, hi1, first1, len);
      check(len == T, $sformatf("period %0d clk", len));
      check(hi0 == d, $sformatf("c1 high %0d clk, d = %0d", hi0, d));
      if (two_phase) begin
        check(hi1 == d, $sformatf("c2 high %0d clk, d = %0d", hi1, d));
        check(first1 == HALF || (d > HALF && first1 == 0),
              $sformatf("c2 shifted by half a period (first high at %0d)", first1));
      end else
        check(hi1 == 0, "c2 idle in single-phase mode");
    end

    // Overrides.
    two_phase = 1'b1;
    @(negedge clk) begin sw_on = 2'b01; sw_off = 2'b10; end
    measure(hi0, hi1, first1, len);
    check(hi0 == T && hi1 == 0, "sw_on forces c1 on, sw_off forces c2 off");
    @(negedge clk) begin sw_on = 2'b10; sw_off = 2'b01; end
    measure(hi0, hi1, first1, len);
    check(hi0 == 0 && hi1 == T, "sw_off forces c1 off, sw_on forces c2 on");
    @(negedge clk) begin sw_on = 2'b00; sw_off = 2'b00; end

    // Counter restart.
    @(negedge clk);
    while (!period_start) @(negedge clk);
    repeat (100) @(negedge clk);
    restart_val = DW'(T - 300);
    restart = 1'b1;
    @(negedge clk) restart = 1'b0;
    len = 0;
    while (!period_start) begin
      @(negedge clk);
      len++;
    end
    check(len == 300, $sformatf("restart: next period start after %0d clk", len));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
