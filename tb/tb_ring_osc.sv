// tb_ring_osc: self-checking test of the race ring oscillator.
// A pulse of W periods is injected with speed-up code f (D = f + 1). The
// test checks the first cell's output edges (rising after T_RISE, pulse
// W - D wide), the number of cells the pulse enters (ceil(W / D)), and the
// period in which the last falling edge disappears,
//     W - 1 + ceil(W / D) * (T_RISE - D)  after the injected rising edge.
module tb_ring_osc;
  localparam int TR = 128;
  logic       clk = 0, rst_n = 0, inj = 0;
  logic [4:0] fsw = 0;
  logic [4:0] node, set_ev, rst_ev;
  int checks = 0, failures = 0;

  ring_osc #(.T_RISE(TR)) dut (.clk, .rst_n, .inj, .fsw, .node, .set_ev, .rst_ev);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic race(int w, int f);
    int d = f + 1, n_exp = (w + d - 1) / d;
    int t = 0, n_set = 0, last_rst = -1, r0 = -1, f0 = -1;
    fsw = 5'(f);
    @(posedge clk); #1 inj = 1;
    #1;
    // t counts periods from the injected rising edge (cycle 0)
    for (t = 0; t < 6000; t++) begin
      n_set += $countones(set_ev);
      if (|rst_ev) last_rst = t;
      if (node[0] && r0 < 0) r0 = t;
      if (!node[0] && r0 >= 0 && f0 < 0) f0 = t;
      @(posedge clk); #1;
      if (t + 1 == w) inj = 0;
    end
    check(n_set == n_exp, $sformatf("W=%0d D=%0d cells entered %0d exp %0d", w, d, n_set, n_exp));
    check(last_rst == w - 1 + n_exp * (TR - d),
          $sformatf("W=%0d D=%0d last reset %0d exp %0d", w, d, last_rst, w - 1 + n_exp * (TR - d)));
    if (w > d) begin
      check(r0 == TR && f0 - r0 == w - d,
            $sformatf("W=%0d D=%0d cell0 out rise %0d width %0d", w, d, r0, f0 - r0));
    end else begin
      check(r0 < 0, $sformatf("W=%0d D=%0d pulse not swallowed in cell 0", w, d));
    end
    check(node == '0, "ring not quiet after the race");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    race(32, 0);   // longest race: 32 cells, more than six laps
    race(32, 31);  // swallowed in the first cell
    race(10, 2);
    race(1, 0);
    race(17, 4);
    for (int i = 0; i < 4; i++) race(1 + int'($urandom_range(31)), int'($urandom_range(31)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
