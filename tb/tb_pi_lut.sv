// tb_pi_lut: self-checking test of the look-up-table PI compensator.
// A reference model in the testbench computes
//     u[n] = clamp(u[n-1] + (KP + KI) e[n] - KP e[n-1], 0, 2**9 - 1)
// with ordinary multiplication and checks fsw = u >> 4 after every enabled
// update. Random errors, long runs of saturating errors at both ends and
// periods with ce low (no update) are applied.
module tb_pi_lut;
  localparam int KP = 6, KI = 2, FRAC = 4;
  logic              clk = 0, rst_n = 0, ce = 0;
  logic signed [3:0] e = 0;
  logic [4:0]        fsw;
  int checks = 0, failures = 0;
  int u_ref, e_prev_ref, n_hi = 0, n_lo = 0;

  pi_lut #(.KP_Q(KP), .KI_Q(KI), .FRAC(FRAC), .U_INIT(8)) dut (.clk, .rst_n, .ce, .e, .fsw);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(int ev, bit en);
    @(negedge clk);
    e = 4'(ev); ce = en;
    @(negedge clk);
    ce = 0;
    if (en) begin
      u_ref = u_ref + (KP + KI) * ev - KP * e_prev_ref;
      if (u_ref < 0) begin u_ref = 0; n_lo++; end
      if (u_ref > 511) begin u_ref = 511; n_hi++; end
      e_prev_ref = ev;
    end
    checks++;
    if (int'(fsw) != u_ref / 16) begin
      failures++;
      $display("e=%0d: fsw=%0d expected %0d", ev, fsw, u_ref / 16);
    end
  endtask

  initial begin
    u_ref = 8 * 16; e_prev_ref = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    checks++; if (fsw != 5'd8) failures++;
    for (int i = 0; i < 200; i++) step(int'($urandom_range(15)) - 8, 1'b1);
    for (int i = 0; i < 60; i++)  step(7, 1'b1);
    for (int i = 0; i < 20; i++)  step(int'($urandom_range(15)) - 8, 1'b0);
    for (int i = 0; i < 80; i++)  step(-8, 1'b1);
    for (int i = 0; i < 200; i++) step(int'($urandom_range(6)) - 3, 1'b1);
    checks++; if (n_hi == 0 || n_lo == 0) begin failures++; $display("clamps not reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
