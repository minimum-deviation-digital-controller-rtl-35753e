// Testbench for pid_compensator.
//
// Applies random errors on random sample strobes and compares d_out and d_int
// after every clk with a reference model of the positional PID written in the
// testbench (integer arithmetic with FRAC fraction bits, saturation of the
// integrator and of the output to [0, 2^DW - 1]). Randomly asserts tr_mode
// and checks that the integrator and output are preset to d_steady and that
// after the hand-back the first sample has no derivative kick (the error
// history follows e while tr_mode is high). Runs at the default parameters
// (13-bit duty, Kp = 5, Ki = 2, Kd = 40 scaled by 64).
// Own choices: clock period 1 ns; error range +-32; sample strobes every 2 to
// 6 clk.
module tb_pid_compensator;
  timeunit 1ns; timeprecision 1ps;

  localparam int DW = 13, EW = 7, FRAC = 6, KP = 320, KI = 128, KD = 2560;
  localparam longint UMAX = ((longint'(1) << DW) - 1) <<< FRAC;

  int checks = 0, failures = 0, n_sat = 0, n_tr = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic sample = 1'b0, tr_mode = 1'b0;
  logic signed [EW-1:0] e_in = '0;
  logic [DW-1:0] d_steady = '0, d_out, d_int;

  always #0.5 clk = ~clk;

  pid_compensator dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (t=%0t)", msg, $time);
    end
  endtask

  function automatic longint sat(input longint v);
    if (v > UMAX) return UMAX;
    if (v < 0)    return 0;
    return v;
  endfunction

  longint m_acc = 0, m_u = 0, m_e1 = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (tr_mode) begin
        m_acc <= longint'(d_steady) <<< FRAC;
        m_u   <= longint'(d_steady) <<< FRAC;
        m_e1  <= longint'(e_in);
      end else if (sample) begin
        longint a;
        a = sat(m_acc + KI * longint'(e_in));
        m_acc <= a;
        m_u   <= sat(a + KP * longint'(e_in) + KD * (longint'(e_in) - m_e1));
        m_e1  <= longint'(e_in);
      end
    end
  end

  always @(negedge clk) begin
    if (rst_n) begin
      check(longint'(d_out) == (m_u >>> FRAC), "d_out matches model");
      check(longint'(d_int) == (m_acc >>> FRAC), "d_int matches model");
      if (d_out == '1 || (d_out == 0 && m_acc == 0)) n_sat++;
    end
  end

  initial begin
    #400000;
    $display("FAIL: watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bias;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int blk = 0; blk < 60; blk++) begin
      bias = int'($urandom_range(0, 40)) - 20;
      repeat (50) begin
        @(negedge clk);
        e_in   = EW'(bias + int'($urandom_range(0, 24)) - 12);
        sample = 1'b1;
        @(negedge clk) sample = 1'b0;
        repeat ($urandom_range(0, 4)) @(negedge clk);
      end
      if ($urandom_range(0, 2) == 0) begin
        // Suppression mode: preset, then hand back with a held error.
        @(negedge clk);
        d_steady = DW'($urandom_range(500, 7000));
        e_in     = EW'(int'($urandom_range(0, 16)) - 8);
        tr_mode  = 1'b1;
        n_tr++;
        repeat (5) @(negedge clk);
        check(d_out == d_steady && d_int == d_steady, "preset to d_steady in tr_mode");
        tr_mode = 1'b0;
        sample  = 1'b1;
        @(negedge clk) sample = 1'b0;
        // First sample after hand-back: same e, no derivative term.
        check(int'(d_out) - int'(d_steady) <= (KP + KI) * 8 / 64 + 1 &&
              int'(d_steady) - int'(d_out) <= (KP + KI) * 8 / 64 + 1,
              "no derivative kick after hand-back");
      end
    end
    check(n_tr > 5, "tr_mode presets exercised");
    check(n_sat > 0, "saturation exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
