// tb_table1_ranges: range test of the DPFM/DPAM modulator at its default
// parameters, with one clock period standing for one 12.5 ns delay cell.
//  - Pulse amplitude: sweeps t_on over all 32 codes and measures each gate
//    pulse; expects (t_on + 1) * 12.5 ns, i.e. 12.5 ns to 400 ns.
//  - Pulse frequency: at dlb_sel = 31 sweeps f_sw over all 32 codes,
//    measures the switching period, checks it against
//    1 + W + ceil(W/D) * (128 - D) and that it falls as f_sw rises, and
//    checks that the swept range covers 20 kHz to 500 kHz.
//  - Open-loop step of the on-time word: the new on-time must appear in
//    the first cycle that starts after the step, with no cycle lost.
module tb_table1_ranges;
  import dpfm_pkg::*;
  logic  clk = 0, rst_n = 0, en = 0, gate, f_clk, eor;
  code_t t_on = 0, dlb_sel = 31, fsw = 31;
  int checks = 0, failures = 0;

  dpfm_dpam dut (.clk, .rst_n, .en, .t_on, .dlb_sel, .fsw, .gate, .f_clk, .eor);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Measure one full cycle: waits for f_clk, returns the gate width and
  // the distance to the next f_clk.
  task automatic measure(output int on_w, output int per);
    on_w = 0; per = 0;
    do @(posedge clk); while (!f_clk);
    do begin
      @(posedge clk); per++;
      if (gate) on_w++;
    end while (!f_clk);
  endtask

  initial begin
    int on_w, per, prev_per;
    real f_lo, f_hi, tcell;
    tcell = real'(TCELL_PS) * 1.0e-12;
    repeat (3) @(negedge clk);
    rst_n = 1;
    en = 1;
    // pulse amplitude sweep; words change right after a trigger so the
    // next measured cycle uses them
    for (int k = 0; k < 32; k++) begin
      @(posedge clk iff f_clk); @(negedge clk) t_on = code_t'(k);
      measure(on_w, per);
      check(on_w == k + 1, $sformatf("t_on=%0d: on-time %0d periods", k, on_w));
    end
    $display("on-time range %0.1f ns to %0.1f ns", 1 * tcell * 1e9, 32 * tcell * 1e9);
    // pulse frequency sweep
    prev_per = 1 << 30;
    f_lo = 1.0e12; f_hi = 0.0;
    for (int f = 0; f < 32; f++) begin
      int d, exp_p;
      @(posedge clk iff f_clk); @(negedge clk) fsw = code_t'(f);
      measure(on_w, per);
      d = f + 1;
      exp_p = 1 + 32 + ((32 + d - 1) / d) * (128 - d);
      check(per == exp_p, $sformatf("fsw=%0d: period %0d expected %0d", f, per, exp_p));
      check(per < prev_per, $sformatf("fsw=%0d: period not falling", f));
      prev_per = per;
      if (1.0 / (per * tcell) < f_lo) f_lo = 1.0 / (per * tcell);
      if (1.0 / (per * tcell) > f_hi) f_hi = 1.0 / (per * tcell);
    end
    $display("switching frequency range %0.1f kHz to %0.1f kHz", f_lo / 1e3, f_hi / 1e3);
    check(f_lo <= 20.0e3 && f_hi >= 500.0e3, "frequency range does not cover 20-500 kHz");
    // open-loop on-time step
    fsw = 10; t_on = 3;
    repeat (3) measure(on_w, per);
    check(on_w == 4, "on-time before the step");
    @(posedge clk iff f_clk); @(negedge clk) t_on = 25;
    measure(on_w, per);
    check(on_w == 26, $sformatf("on-time after the step %0d", on_w));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
