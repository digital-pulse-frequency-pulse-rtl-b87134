// dpfm_dpam: digital pulse-frequency / pulse-amplitude modulator.
//
// Each switching cycle starts with a one-period trigger. The trigger turns
// the high-side switch on (`gate`) and starts both delay lines. Delay line
// A returns the trigger t_on + 1 periods later and turns the switch off, so
// the on-time, and with it the inductor peak current, is set by t_on (the
// pulse-amplitude part). The frequency regulator (delay line B, the race
// ring and the end-of-race detector) signals the end of the cycle, which
// triggers the next one (the pulse-frequency part). The trigger is also
// brought out as `f_clk`, a one-period enable that lets the rest of the
// controller work once per switching cycle.
//
// Control words are registered at the trigger and held for the cycle. With
// W = dlb_sel + 1 and D = fsw + 1 (T_STEP = 1) the switching period is
//     T_sw = 1 + W + ceil(W / D) * (T_RISE - D)  clock periods
// and the on-time is t_on + 1 periods. With the assumed 12.5 ns clock the
// on-time spans 12.5-400 ns and, at dlb_sel = 31, the period spans
// 129-4097 periods (about 620 kHz down to 19.5 kHz).
//
// The architecture follows the modulator description. The synchronous
// timing clock in place of analog delay cells, the start-up kick when `en`
// rises, and stopping at the end of the current cycle when `en` falls are
// this design's choices.
module dpfm_dpam #(
  parameter int unsigned NCELLS_DL   = dpfm_pkg::DL_CELLS,
  parameter int unsigned NCELLS_RING = dpfm_pkg::RING_CELLS,
  parameter int unsigned CTRL_W      = dpfm_pkg::CODE_W,
  parameter int unsigned T_RISE      = 128,
  parameter int unsigned T_STEP      = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic [CTRL_W-1:0] t_on,
  input  logic [CTRL_W-1:0] dlb_sel,
  input  logic [CTRL_W-1:0] fsw,
  output logic              gate,
  output logic              f_clk,
  output logic              eor
);

  logic              running, trig, dla_out;
  logic [CTRL_W-1:0] t_on_q, dlb_q, fsw_q;

  // Start when enabled and idle; afterwards every end of race re-triggers.
  assign trig  = en && (!running || eor);
  assign f_clk = trig;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      t_on_q  <= '0;
      dlb_q   <= '0;
      fsw_q   <= '0;
    end else begin
      if (trig) begin
        running <= 1'b1;
        t_on_q  <= t_on;
        dlb_q   <= dlb_sel;
        fsw_q   <= fsw;
      end else if (eor) begin
        running <= 1'b0;
      end
    end
  end

  delay_line #(.NCELLS(NCELLS_DL), .SEL_W(CTRL_W)) u_dla (
    .clk, .rst_n, .start(trig), .sel(t_on_q), .out(dla_out)
  );

  // Switch-on latch: set by the trigger, reset by delay line A.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       gate <= 1'b0;
    else if (trig)    gate <= 1'b1;
    else if (dla_out) gate <= 1'b0;
  end

  freq_regulator #(
    .NCELLS_DL(NCELLS_DL), .NCELLS_RING(NCELLS_RING), .CTRL_W(CTRL_W),
    .T_RISE(T_RISE), .T_STEP(T_STEP)
  ) u_freg (
    .clk, .rst_n, .trig, .dlb_sel(dlb_q), .fsw(fsw_q), .inj(), .latch(), .eor
  );

  // Once triggered, the cycle ends with an end of race.
  a_gate_in_cycle: assert property (@(posedge clk) disable iff (!rst_n)
    gate |-> running)
    else $error("dpfm_dpam: gate high outside a switching cycle");

endmodule
