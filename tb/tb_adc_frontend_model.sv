// Testbench for adc_frontend_model (behavioural analog front end of the ADC).
//
// Drives vout around a fixed vref (microvolt integers) and checks:
//  - static comparators: st_h only when vref - vout > Vq2 (8 mV), st_l only
//    when vout - vref > Vq2, neither inside the zero bin;
//  - dynamic window: a slow ramp of the error by X mV gives X / Vq1 rising
//    edges of dy_h (one per 4 mV step) and the ramp back gives as many
//    falling edges of dy_l (within one step);
//  - each dy_h pulse lasts the S/H settling time T_TSH (2 ns): the window
//    is moved only after the hold has settled.
// Own choices: 0.1 mV steps every 5 ns for the slow ramp; random ramp lengths.
module tb_adc_frontend_model;
  timeunit 1ns; timeprecision 1ps;

  localparam int VREF = 1_800_000, VQ1 = 4000, VQ2 = 8000;

  int checks = 0, failures = 0;
  int vout_uv = VREF, vref_uv = VREF;
  logic st_h, st_l, dy_h, dy_l;
  int n_up = 0, n_dn = 0;
  realtime t_rise = 0, w_min = 1.0e9, w_max = 0;

  adc_frontend_model dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (t=%0t)", msg, $time);
    end
  endtask

  always @(posedge dy_h) begin
    n_up++;
    t_rise = $realtime;
  end
  always @(negedge dy_h) begin
    if ($realtime - t_rise < w_min) w_min = $realtime - t_rise;
    if ($realtime - t_rise > w_max) w_max = $realtime - t_rise;
  end
  always @(negedge dy_l) n_dn++;

  initial begin
    #1000000;
    $display("FAIL: watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x, dv;
    #10;
    // Static comparators.
    for (int k = 0; k < 200; k++) begin
      dv = int'($urandom_range(0, 40000)) - 20000;
      if (dv > -8200 && dv < -7800) dv = -9000;   // keep clear of the edges
      if (dv > 7800 && dv < 8200) dv = 9000;
      vout_uv = VREF - dv;
      #5;
      check(st_h == (dv > VQ2), $sformatf("st_h at error %0d uV", dv));
      check(st_l == (dv < -VQ2), $sformatf("st_l at error %0d uV", dv));
    end
    vout_uv = VREF;
    #50;

    // Dynamic window: slow ramps up and back.
    for (int k = 0; k < 6; k++) begin
      x = int'($urandom_range(12, 60));
      n_up = 0;
      n_dn = 0;
      for (int i = 1; i <= 10 * x; i++) begin
        vout_uv = vout_uv - 100;
        #5;
      end
      check(n_up >= x * 1000 / VQ1 - 1 && n_up <= x * 1000 / VQ1 + 1,
            $sformatf("%0d mV up gives %0d steps", x, n_up));
      for (int i = 1; i <= 10 * x; i++) begin
        vout_uv = vout_uv + 100;
        #5;
      end
      check(n_dn >= n_up - 1 && n_dn <= n_up + 1,
            $sformatf("%0d mV down gives %0d steps (up %0d)", x, n_dn, n_up));
    end
    check(w_min > 1.9 && w_max < 2.1, $sformatf("dy_h pulse width %0.2f .. %0.2f ns", w_min, w_max));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
