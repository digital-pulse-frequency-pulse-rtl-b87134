// ring_osc: race ring oscillator of programmable asymmetric delay cells.
//
// NCELLS cells form a ring closed through an OR gate with the injection
// input `inj`. Every cell passes a rising edge after T_RISE clock periods
// and a falling edge after T_RISE - (fsw + 1) * T_STEP periods, so the
// falling edge of an injected pulse gains (fsw + 1) * T_STEP periods on the
// rising edge in each cell it crosses: the pulse shrinks on every cell and
// vanishes once the falling edge has caught up. A pulse of W periods thus
// lives for about ceil(W / ((fsw + 1) * T_STEP)) cells, which turns a short
// delay into a long, programmable interval.
//
// The race principle (rising edge slow, falling edge fast, a 5-bit code
// programming the cells) follows the modulator description. Modelling each
// cell as a pair of edge timers on the timing clock, the edge delays and
// the fixed T_RISE with a programmable speed-up of the falling edge are this
// design's choices. A cell whose falling edge catches its rising edge (the
// output pulse would be zero or negative wide) swallows the pulse.
//
// Besides the cell outputs `node`, the ring reports per cell the events the
// end-of-race latches need: `set_ev[k]` when a rising edge enters cell k and
// `rst_ev[k]` when the falling edge leaves cell k or is swallowed there.
// fsw must be held while a race runs. The injected pulse must end before
// its rising edge comes back round (NCELLS * T_RISE periods); an assertion
// checks that.
module ring_osc #(
  parameter int unsigned NCELLS = dpfm_pkg::RING_CELLS,
  parameter int unsigned CTRL_W = dpfm_pkg::CODE_W,
  parameter int unsigned T_RISE = 128,
  parameter int unsigned T_STEP = 1,
  parameter int unsigned CNT_W  = $clog2(T_RISE + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              inj,
  input  logic [CTRL_W-1:0] fsw,
  output logic [NCELLS-1:0] node,
  output logic [NCELLS-1:0] set_ev,
  output logic [NCELLS-1:0] rst_ev
);

  // The fastest falling edge must still take at least two periods.
  initial assert (T_RISE >= (2 ** CTRL_W) * T_STEP + 2)
    else $error("ring_osc: T_RISE too small for the falling-edge speed-up");

  logic [CNT_W-1:0]  t_fall;
  logic [NCELLS-1:0] x, x_d;          // cell inputs and their last value
  logic [NCELLS-1:0] r_act, f_act;    // rising / falling edge in flight
  logic [CNT_W-1:0]  r_cnt [NCELLS];
  logic [CNT_W-1:0]  f_cnt [NCELLS];
  logic [NCELLS-1:0] r_fire, f_fire;

  assign t_fall = CNT_W'(T_RISE - (32'(fsw) + 1) * T_STEP);

  always_comb begin
    x[0] = inj | node[NCELLS-1];
    for (int k = 1; k < NCELLS; k++) x[k] = node[k-1];
    for (int k = 0; k < NCELLS; k++) begin
      r_fire[k] = r_act[k] && r_cnt[k] == CNT_W'(1);
      f_fire[k] = f_act[k] && f_cnt[k] == CNT_W'(1);
    end
  end

  assign set_ev = x & ~x_d;
  assign rst_ev = f_fire;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_d   <= '0;
      node  <= '0;
      r_act <= '0;
      f_act <= '0;
      for (int k = 0; k < NCELLS; k++) begin
        r_cnt[k] <= '0;
        f_cnt[k] <= '0;
      end
    end else begin
      x_d <= x;
      for (int k = 0; k < NCELLS; k++) begin
        // Rising edge timer.
        if (x[k] && !x_d[k]) begin
          r_act[k] <= 1'b1;
          r_cnt[k] <= CNT_W'(T_RISE - 1);
        end else if (r_act[k]) begin
          r_cnt[k] <= r_cnt[k] - 1'b1;
          if (r_fire[k] || f_fire[k]) r_act[k] <= 1'b0;
        end
        // Falling edge timer.
        if (!x[k] && x_d[k]) begin
          f_act[k] <= 1'b1;
          f_cnt[k] <= t_fall - 1'b1;
        end else if (f_act[k]) begin
          f_cnt[k] <= f_cnt[k] - 1'b1;
          if (f_fire[k]) f_act[k] <= 1'b0;
        end
        // Output: a falling edge that arrives no later than the rising
        // edge swallows the pulse.
        if (f_fire[k])      node[k] <= 1'b0;
        else if (r_fire[k]) node[k] <= 1'b1;
      end
    end
  end

  // A new rising edge must not enter a cell that still holds a pulse.
  property p_one_pulse(int unsigned k);
    @(posedge clk) disable iff (!rst_n) (x[k] && !x_d[k]) |-> !(r_act[k] || f_act[k]);
  endproperty
  for (genvar k = 0; k < NCELLS; k++) begin : g_chk
    a_one_pulse: assert property (p_one_pulse(k))
      else $error("ring_osc: pulse re-entered cell %0d before leaving it", k);
  end

endmodule
