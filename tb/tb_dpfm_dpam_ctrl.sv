// tb_dpfm_dpam_ctrl: closed-loop, end-to-end test of the DPFM/DPAM
// controller at its default parameters, driving a behavioural DCM buck
// converter (3.6 V in, 1.8 V out, 1 uH, 10 uF) through a behavioural error
// ADC (10 mV steps). The clock period stands for one 12.5 ns delay cell.
//
// Phases: start-up with the fixed on-time (conventional PFM), a load step
// from 90 ohm to 45 ohm and back, then the optimized on-time, then an
// input-voltage step, a stop and a restart. Checked throughout:
//  - every switching period equals 1 + W + ceil(W/D) * (128 - D) clock
//    periods for the words in force (W = t_on + 1, D = fsw + 1), and every
//    gate pulse lasts t_on + 1 periods;
//  - at the end of each phase the mean output is within 25 mV of 1.8 V;
//  - with the optimized on-time, t_on settles where the optimizer's table
//    maps the code to itself, and returns to the fixed code when disabled.
// Counted, and a failure if never seen: frequency-word changes, on-time
// changes, races that wrap round the ring more than once, races swallowed
// in the first cell, mode switches, a stop and a restart.
module tb_dpfm_dpam_ctrl;
  import dpfm_pkg::*;

  logic  clk = 0, rst_n = 0, en = 0, opt_en = 0, gate, f_clk;
  err_t  e;
  code_t t_on, fsw;
  real   vg = 3.6, r_load = 90.0, v_out, i_l;
  int checks = 0, failures = 0;

  dpfm_dpam_ctrl dut (.clk, .rst_n, .en, .opt_en, .e, .gate, .f_clk, .t_on, .fsw);
  buck_dcm_model u_buck (.clk, .gate, .vg, .r_load, .v_out, .i_l);
  adc_err_model  u_adc  (.clk, .v(v_out), .e);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Mechanism counters.
  int n_cycles = 0, n_fsw_chg = 0, n_ton_chg = 0, n_wrap = 0, n_swallow1 = 0;
  int n_mode = 0, n_stop = 0, n_restart = 0;

  // Cycle monitor: words sampled at f_clk govern the cycle that starts.
  int    cyc = 0, last = -1, exp_p = 0, exp_on = 0, on_cnt = 0;
  bit    in_on = 0;
  code_t fsw_q = 0, ton_q = 0;
  always @(posedge clk) begin
    cyc++;
    if (gate) on_cnt++;
    if (!gate && in_on) begin
      check(on_cnt == exp_on, $sformatf("on-time %0d expected %0d", on_cnt, exp_on));
      in_on = 0;
    end
    if (f_clk) begin
      int w, d, ncell;
      if (last >= 0)
        check(cyc - last == exp_p, $sformatf("period %0d expected %0d", cyc - last, exp_p));
      if (n_cycles > 0 && fsw != fsw_q) n_fsw_chg++;
      if (n_cycles > 0 && t_on != ton_q) n_ton_chg++;
      fsw_q = fsw; ton_q = t_on;
      w = int'(t_on) + 1; d = int'(fsw) + 1;
      ncell = (w + d - 1) / d;
      if (ncell > int'(RING_CELLS)) n_wrap++;
      if (ncell == 1) n_swallow1++;
      exp_p  = 1 + w + ncell * (128 - d);
      exp_on = w;
      last   = cyc;
      on_cnt = 0;
      in_on  = 1;
      n_cycles++;
    end
  end

  // Mean output over a window.
  task automatic settle_and_check(int periods, string phase);
    real acc = 0.0, vmin = 10.0, vmax = 0.0;
    repeat (periods / 2) @(posedge clk);
    for (int i = 0; i < periods / 2; i++) begin
      @(posedge clk);
      acc += v_out;
      if (v_out < vmin) vmin = v_out;
      if (v_out > vmax) vmax = v_out;
    end
    acc = acc / real'(periods / 2);
    $display("%s: mean %0.4f V, ripple %0.1f mV, t_on %0d, fsw %0d",
             phase, acc, (vmax - vmin) * 1000.0, t_on, fsw);
    check(acc > 1.775 && acc < 1.825, $sformatf("%s: output %0.4f V not regulated", phase, acc));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    en = 1;
    settle_and_check(200000, "fixed on-time, 90 ohm");
    r_load = 45.0;
    settle_and_check(200000, "fixed on-time, 45 ohm");
    r_load = 200.0;
    settle_and_check(300000, "fixed on-time, 200 ohm");
    check(t_on == code_t'(15), "fixed on-time code");
    opt_en = 1; n_mode++;
    settle_and_check(600000, "optimized on-time, 200 ohm");
    r_load = 60.0;
    settle_and_check(300000, "optimized on-time, 60 ohm");
    vg = 4.5;
    settle_and_check(300000, "optimized on-time, Vg 4.5 V");
    check(t_on == code_t'(28), $sformatf("on-time settled at %0d, expected 28", t_on));
    opt_en = 0; n_mode++;
    repeat (20000) @(negedge clk);
    check(t_on == code_t'(15), "back to fixed on-time");
    en = 0; n_stop++;
    repeat (10000) @(negedge clk);
    begin
      int n0;
      n0 = n_cycles;
      repeat (20000) @(negedge clk);
      check(n_cycles == n0 && !gate, "switching stopped");
    end
    last = -1;
    en = 1; n_restart++;
    settle_and_check(200000, "restart, 60 ohm");
    $display("cycles %0d, fsw changes %0d, t_on changes %0d, wrapping races %0d, one-cell races %0d",
             n_cycles, n_fsw_chg, n_ton_chg, n_wrap, n_swallow1);
    check(n_fsw_chg > 0, "frequency word never changed");
    check(n_ton_chg > 0, "on-time never changed");
    check(n_wrap > 0, "no race wrapped round the ring");
    check(n_swallow1 > 0, "no race ended in the first cell");
    check(n_mode == 2 && n_stop == 1 && n_restart == 1, "mode switch / stop / restart");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
