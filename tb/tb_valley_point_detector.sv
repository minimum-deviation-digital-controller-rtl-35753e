// Testbench for valley_point_detector.
//
// Feeds random piecewise-monotonic error sequences (runs of rising, falling
// and constant samples, as a quantized ADC output looks around an output
// voltage extreme) and compares both outputs every cycle with a reference
// model kept in the testbench: a valley point is flagged on the first falling
// error step after the last change was rising (output voltage passed its
// minimum), a peak point on the first rising step after a falling one. Both
// are one-cycle pulses one clk after the step is seen. Also counts that each
// kind of extreme was actually produced.
// Own choices: clock period 1 ns; new error sample every clk.
module tb_valley_point_detector;
  timeunit 1ns; timeprecision 1ps;

  localparam int EW = 7;

  int checks = 0, failures = 0, n_valley = 0, n_peak = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [EW-1:0] e_in = '0;
  logic valley_point, peak_point;

  always #0.5 clk = ~clk;

  valley_point_detector #(.EW(EW)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (t=%0t)", msg, $time);
    end
  endtask

  // Reference model.
  int  m_prev = 0, m_dir = 0;   // dir: 0 none, 1 rising, -1 falling
  bit  m_valley = 0, m_peak = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      m_valley <= (int'(e_in) < m_prev) && (m_dir == 1);
      m_peak   <= (int'(e_in) > m_prev) && (m_dir == -1);
      if (int'(e_in) > m_prev)      m_dir <= 1;
      else if (int'(e_in) < m_prev) m_dir <= -1;
      m_prev <= int'(e_in);
    end
  end

  always @(negedge clk) begin
    if (rst_n) begin
      check(valley_point == m_valley, "valley_point matches model");
      check(peak_point == m_peak, "peak_point matches model");
      if (valley_point) n_valley++;
      if (peak_point) n_peak++;
    end
  end

  initial begin
    #200000;
    $display("FAIL: watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v, len, slope;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    v = 0;
    for (int run = 0; run < 400; run++) begin
      len   = int'($urandom_range(1, 12));
      slope = int'($urandom_range(0, 2)) - 1;
      repeat (len) begin
        repeat ($urandom_range(0, 3)) @(negedge clk);   // hold the level
        v = v + slope;
        if (v > 60) v = 60;
        if (v < -60) v = -60;
        @(negedge clk) e_in = EW'(v);
      end
    end
    repeat (4) @(negedge clk);
    check(n_valley > 10, "valley points produced");
    check(n_peak > 10, "peak points produced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
