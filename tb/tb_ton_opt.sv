// tb_ton_opt: self-checking test of the on-time optimizer.
// The testbench computes the optimum on-time for every code itself (input
// voltage from the DCM conversion ratio with the load estimated from the
// period, then the loss minimum, evaluated with exp/log instead of powers)
// and checks that, with opt_en high, t_on moves by one code toward that
// optimum every UPDATE_CYCLES enables and then holds at the fixed point;
// with opt_en low t_on must return to the fixed on-time at once. A second
// instance with a synchronous low-side MOSFET (RON_L = 0.2 ohm) is checked
// the same way against its own reference.
module tb_ton_opt;
  localparam real TCELL = 12.5e-9, V = 1.8, L = 1.0e-6, QR = 1.0e-9,
                  RH = 0.3, RL2 = 0.2, RPT = 1.6e7;
  localparam int  UPD = 4, TFIX = 15;
  logic       clk = 0, rst_n = 0, ce = 0, opt_en = 0;
  logic [4:0] t_on, t_on2;
  int checks = 0, failures = 0, n_moves = 0;
  int opt_ref [32], opt_ref2 [32];

  ton_opt #(.UPDATE_CYCLES(UPD), .TON_FIXED(TFIX)) dut (.clk, .rst_n, .ce, .opt_en, .t_on);
  ton_opt #(.UPDATE_CYCLES(UPD), .TON_FIXED(TFIX), .RON_L(RL2)) dut2 (
    .clk, .rst_n, .ce, .opt_en, .t_on(t_on2)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_code(int k, real rl);
    real ton, tsw, r, vg, topt, c;
    ton = (k + 1) * TCELL;
    tsw = 10.0e-6;                       // any period: it cancels
    r   = RPT * tsw;
    vg  = V / 2.0 * (1.0 + $sqrt(1.0 + 8.0 * L * tsw / (r * ton * ton)));
    topt = $exp($ln(6.0 * QR * vg * L * L /
                    ((vg - V) * (vg - V) * (RH + rl * (vg - V) / V))) / 3.0);
    c = topt / TCELL - 1.0;
    if (c < 0.0) return 0;
    if (c > 31.0) return 31;
    return $rtoi(c + 0.5);
  endfunction

  task automatic tick(int n);
    repeat (n) begin
      @(negedge clk) ce = 1;
      @(negedge clk) ce = 0;
    end
  endtask

  initial begin
    int prev, tgt, prev2, tgt2;
    for (int k = 0; k < 32; k++) begin
      opt_ref[k]  = ref_code(k, 0.0);
      opt_ref2[k] = ref_code(k, RL2);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++; if (t_on != 5'(TFIX)) failures++;
    tick(10);
    checks++; if (t_on != 5'(TFIX)) begin failures++; $display("moved with opt_en low"); end
    opt_en = 1;
    for (int s = 0; s < 40; s++) begin
      prev = int'(t_on);
      tgt  = opt_ref[prev];
      prev2 = int'(t_on2);
      tgt2  = opt_ref2[prev2];
      tick(UPD - 1);
      checks++;
      if (int'(t_on) != prev) begin failures++; $display("moved early"); end
      tick(1);
      checks++;
      if (int'(t_on) != prev + (tgt > prev) - (tgt < prev)) begin
        failures++;
        $display("step %0d: t_on %0d -> %0d, optimum %0d", s, prev, t_on, tgt);
      end
      if (int'(t_on) != prev) n_moves++;
      checks++;
      if (int'(t_on2) != prev2 + (tgt2 > prev2) - (tgt2 < prev2)) begin
        failures++;
        $display("MOSFET step %0d: t_on %0d -> %0d, optimum %0d", s, prev2, t_on2, tgt2);
      end
    end
    checks++;
    if (n_moves == 0 || opt_ref[t_on] != int'(t_on)) begin
      failures++; $display("no fixed point reached: t_on=%0d opt=%0d", t_on, opt_ref[t_on]);
    end
    $display("fixed point t_on=%0d after %0d moves; MOSFET variant %0d", t_on, n_moves, t_on2);
    checks++;
    if (opt_ref2[t_on2] != int'(t_on2) || t_on2 >= t_on) begin
      failures++; $display("MOSFET variant: t_on=%0d opt=%0d", t_on2, opt_ref2[t_on2]);
    end
    opt_en = 0;
    tick(1);
    checks++; if (t_on != 5'(TFIX) || t_on2 != 5'(TFIX)) begin failures++; $display("no return to fixed on-time"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    for (int k = 0; k < 32; k++) $write("%0d ", ref_code(k, 0.0));
    $display("");
  end
endmodule
