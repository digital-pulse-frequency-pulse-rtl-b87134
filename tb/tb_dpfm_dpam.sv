// tb_dpfm_dpam: self-checking test of the DPFM/DPAM modulator.
// With switching enabled the test measures, cycle by cycle, the spacing of
// f_clk pulses (the switching period) and the width of each gate pulse
// (the on-time), and compares them with
//     T_sw = 1 + W + ceil(W / D) * (T_RISE - D),  W = dlb_sel + 1, D = fsw + 1
//     T_on = t_on + 1
// The control words are changed between cycles (the new values must take
// effect from the next trigger), and en is dropped to check that switching
// stops at the end of the running cycle and restarts when en returns.
module tb_dpfm_dpam;
  localparam int TR = 128;
  logic       clk = 0, rst_n = 0, en = 0, gate, f_clk, eor;
  logic [4:0] t_on = 0, dlb_sel = 0, fsw = 0;
  int checks = 0, failures = 0;

  dpfm_dpam #(.T_RISE(TR)) dut (.clk, .rst_n, .en, .t_on, .dlb_sel, .fsw, .gate, .f_clk, .eor);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Cycle-accurate monitor: the words seen at each f_clk set expectations
  // for the cycle it starts.
  int cyc = 0, last_fclk = -1, exp_p = 0, exp_on = 0, on_cnt = 0, n_fclk = 0;
  bit in_on = 0;
  always @(posedge clk) begin
    cyc++;
    if (gate) on_cnt++;
    if (!gate && in_on) begin
      check(on_cnt == exp_on, $sformatf("on-time %0d expected %0d", on_cnt, exp_on));
      in_on = 0;
    end
    if (f_clk) begin
      int w, d;
      if (last_fclk >= 0 && exp_p > 0)
        check(cyc - last_fclk == exp_p,
              $sformatf("period %0d expected %0d", cyc - last_fclk, exp_p));
      w = int'(dlb_sel) + 1; d = int'(fsw) + 1;
      exp_p = 1 + w + ((w + d - 1) / d) * (TR - d);
      exp_on = int'(t_on) + 1;
      last_fclk = cyc;
      on_cnt = 0;
      in_on = 1;
      n_fclk++;
    end
  end

  task automatic set_words(int a, int b, int f);
    @(negedge clk);
    t_on = 5'(a); dlb_sel = 5'(b); fsw = 5'(f);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    check(!gate && !f_clk, "idle after reset");
    set_words(31, 31, 31);
    en = 1;
    repeat (600) @(negedge clk);
    set_words(0, 0, 0);
    repeat (600) @(negedge clk);
    set_words(10, 20, 5);
    repeat (2000) @(negedge clk);
    set_words(31, 31, 0);
    repeat (9000) @(negedge clk);
    set_words(5, 12, 2);
    repeat (2000) @(negedge clk);
    // stop: the running cycle ends, then nothing
    en = 0;
    repeat (5000) @(negedge clk);
    begin
      int n0;
      n0 = n_fclk;
      repeat (3000) @(negedge clk);
      check(n_fclk == n0 && !gate, $sformatf("switching stopped with en low: %0d %0d %0d", n0, n_fclk, gate));
    end
    last_fclk = -1;
    en = 1;
    repeat (2000) @(negedge clk);
    check(n_fclk > 20, $sformatf("only %0d cycles seen", n_fclk));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
