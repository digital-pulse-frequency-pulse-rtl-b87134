// tb_eor_detect: self-checking test of the end-of-race detector.
// Drives latch set/reset events as a pulse crossing several cells would,
// then as a pulse swallowed in its first cell, and checks that eor pulses
// exactly once, one period after the last latch is reset, and never while
// a latch is high.
module tb_eor_detect;
  logic       clk = 0, rst_n = 0;
  logic [4:0] set_ev = 0, rst_ev = 0, latch;
  logic       eor;
  int checks = 0, failures = 0, n_eor = 0;

  eor_detect dut (.clk, .rst_n, .set_ev, .rst_ev, .latch, .eor);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && eor) n_eor++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic ev(logic [4:0] s, logic [4:0] r);
    @(negedge clk) begin set_ev = s; rst_ev = r; end
    @(negedge clk) begin set_ev = 0; rst_ev = 0; end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    check(n_eor == 0 && !eor, "eor before any race");
    // pulse enters cells 0..3 (wrapping would look the same), each set
    // before the previous cell's reset; swallowed in cell 3
    ev(5'b00001, 0);
    check(latch == 5'b00001 && !eor, "latch 0 set");
    ev(5'b00010, 0);
    ev(0, 5'b00001);
    check(latch == 5'b00010 && !eor, "latch 1 only");
    ev(5'b00100, 5'b00010);  // set of next and reset of this in one period
    check(latch == 5'b00100 && !eor, "hand-over in one period");
    ev(5'b01000, 0);
    ev(0, 5'b00100);
    check(n_eor == 0, "no eor while a latch is high");
    @(negedge clk) rst_ev = 5'b01000;
    @(negedge clk) rst_ev = 0;
    check(eor == 1'b1 && latch == 0, "eor one period after last reset");
    @(negedge clk);
    check(eor == 1'b0 && n_eor == 1, "eor lasts one period");
    // second race: swallowed in its first cell
    ev(5'b00001, 0);
    repeat (4) @(negedge clk);
    ev(0, 5'b00001);
    repeat (3) @(negedge clk);
    check(n_eor == 2, "second race ends once");
    repeat (10) @(negedge clk);
    check(n_eor == 2, "no eor when idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
