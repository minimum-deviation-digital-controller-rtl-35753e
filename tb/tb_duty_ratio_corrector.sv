// Testbench for duty_ratio_corrector (loss-compensating duty ratio LUT).
//
// Keeps a reference copy of the table in the testbench. Each round picks a
// random transient direction (hl), ramp time t_meas and D_old, issues rd,
// checks d_est = D_old + table[address] (saturated) while corr_en is high and
// d_est = D_old while it is low, then issues wr with a random D_new and
// updates the reference entry with D_new - D_old. The address is
// {hl, min(t_meas >> T_SHIFT, 2^ABITS - 1)}. Also checks that the table
// starts at zero and that both directions and saturated addresses are used.
// Own choices: clock period 1 ns; default parameters (13-bit duty, 16-bit
// time, 2 x 8 entries, truncation by 11 bits).
module tb_duty_ratio_corrector;
  timeunit 1ns; timeprecision 1ps;

  localparam int DW = 13, TW = 16, ABITS = 3, T_SHIFT = 11;
  localparam int N = 2 << ABITS;

  int checks = 0, failures = 0, n_hl = 0, n_top = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic corr_en = 1'b1, hl = 1'b0, rd = 1'b0, wr = 1'b0;
  logic [TW-1:0] t_meas = '0;
  logic [DW-1:0] d_old = '0, d_new = '0, d_est;
  int ref_lut [N];

  always #0.5 clk = ~clk;

  duty_ratio_corrector #(.DW(DW), .TW(TW), .ABITS(ABITS), .T_SHIFT(T_SHIFT)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (t=%0t)", msg, $time);
    end
  endtask

  function automatic int addr_of(input bit h, input int t);
    int a;
    a = t >> T_SHIFT;
    if (a > (1 << ABITS) - 1) a = (1 << ABITS) - 1;
    return (int'(h) << ABITS) | a;
  endfunction

  initial begin
    #200000;
    $display("FAIL: watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a, t, dold, dnew, expect_v;
    foreach (ref_lut[i]) ref_lut[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 400; k++) begin
      hl      = 1'($urandom_range(0, 1));
      t       = int'($urandom_range(0, 20000));
      dold    = int'($urandom_range(0, (1 << DW) - 1));
      a       = addr_of(hl, t);
      corr_en = 1'b1;
      t_meas  = TW'(t);
      d_old   = DW'(dold);
      #0.1;
      expect_v = dold + ref_lut[a];
      if (expect_v < 0) expect_v = 0;
      if (expect_v > (1 << DW) - 1) expect_v = (1 << DW) - 1;
      check(int'(d_est) == expect_v, $sformatf("d_est = %0d, expected %0d", d_est, expect_v));
      if (k < 4) check(int'(d_est) == dold, "table starts at zero");
      corr_en = 1'b0;
      #0.1;
      check(d_est == d_old, "no correction when disabled");
      corr_en = 1'b1;
      @(negedge clk) rd = 1'b1;
      @(negedge clk) rd = 1'b0;
      // Inputs move on before the update: the latched values must be used.
      t_meas = TW'($urandom);
      d_old  = DW'($urandom);
      repeat ($urandom_range(0, 5)) @(negedge clk);
      dnew  = int'($urandom_range(dold > 300 ? dold - 300 : 0,
                                  dold < (1 << DW) - 301 ? dold + 300 : (1 << DW) - 1));
      d_new = DW'(dnew);
      wr    = 1'b1;
      @(negedge clk) wr = 1'b0;
      ref_lut[a] = dnew - dold;
      if (hl) n_hl++;
      if ((a & ((1 << ABITS) - 1)) == (1 << ABITS) - 1) n_top++;
    end
    check(n_hl > 50 && n_hl < 350, "both transient directions used");
    check(n_top > 10, "saturated addresses used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
