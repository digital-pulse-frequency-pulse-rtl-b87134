// tb_freq_regulator: self-checking test of the frequency regulator.
// For pairs (dlb_sel, fsw) a trigger is given and the time to eor is
// compared with P = 1 + W + ceil(W / D) * (T_RISE - D), W = dlb_sel + 1,
// D = fsw + 1; the injected pulse must be exactly W periods wide.
module tb_freq_regulator;
  localparam int TR = 128;
  logic       clk = 0, rst_n = 0, trig = 0, inj, eor;
  logic [4:0] dlb_sel = 0, fsw = 0, latch;
  int checks = 0, failures = 0;

  freq_regulator #(.T_RISE(TR)) dut (.clk, .rst_n, .trig, .dlb_sel, .fsw, .inj, .latch, .eor);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(int s, int f);
    int w = s + 1, d = f + 1, p_exp, t, p = -1, iw = 0;
    p_exp = 1 + w + ((w + d - 1) / d) * (TR - d);
    dlb_sel = 5'(s); fsw = 5'(f);
    @(negedge clk) trig = 1;
    @(negedge clk) trig = 0;
    for (t = 1; t < 5000 && p < 0; t++) begin
      if (inj) iw++;
      if (eor) p = t;
      @(negedge clk);
    end
    checks++;
    if (p != p_exp) begin
      failures++; $display("sel=%0d fsw=%0d: period %0d expected %0d", s, f, p, p_exp);
    end
    checks++;
    if (iw != w) begin
      failures++; $display("sel=%0d: injected width %0d expected %0d", s, iw, w);
    end
    repeat (2) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    one(31, 0); one(31, 31); one(0, 0); one(15, 3); one(7, 8);
    for (int i = 0; i < 8; i++) one(int'($urandom_range(31)), int'($urandom_range(31)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
