// tb_delay_line: self-checking test of the programmable delay line.
// For every select code a one-period pulse is sent and the cycle on which
// it reappears at the output is compared with sel + 1; a second pass uses
// random codes and checks that no spurious output pulse appears.
module tb_delay_line;
  logic       clk = 0, rst_n = 0, start = 0, out;
  logic [4:0] sel = 0;
  int checks = 0, failures = 0;

  delay_line dut (.clk, .rst_n, .start, .sel, .out);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_one(int s);
    int t, seen;
    sel = 5'(s);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    t = 1; seen = -1;
    // count clock periods after the start pulse
    for (int i = 0; i < 40; i++) begin
      if (out && seen < 0) seen = t;
      else if (out) begin failures++; $display("extra output for sel=%0d", s); end
      @(negedge clk); t++;
    end
    checks++;
    if (seen != s + 1) begin
      failures++;
      $display("sel=%0d: delay %0d, expected %0d", s, seen, s + 1);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    checks++; if (out !== 1'b0) failures++;
    for (int s = 0; s < 32; s++) run_one(s);
    for (int i = 0; i < 20; i++) run_one(int'($urandom_range(31)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
