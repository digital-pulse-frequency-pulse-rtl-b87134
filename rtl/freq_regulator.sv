// freq_regulator: frequency regulator of the DPFM/DPAM modulator.
//
// Made of delay line B, the race ring oscillator and the end-of-race
// detector. A one-period trigger pulse `trig` sets the injection latch,
// which drives the ring input high (the slow rising edge); delay line B
// repeats the trigger dlb_sel + 1 periods later and clears the latch (the
// fast falling edge). The pulse of W = dlb_sel + 1 periods then races round
// the ring, losing D = fsw + 1 periods (times T_STEP) in every cell, until
// it vanishes and the detector pulses `eor`.
//
// With T_STEP = 1 the time from trig to eor is
//     P = 1 + W + ceil(W / D) * (T_RISE - D)     clock periods,
// so that eor can start the next cycle P periods after the last. The
// composition (delay line B feeding two time-shifted edges into a ring,
// S-R latch end-of-race detection) follows the modulator description; the
// injection latch and the register-level timing are this design's choices.
// dlb_sel and fsw must be held from trig until eor.
module freq_regulator #(
  parameter int unsigned NCELLS_DL   = dpfm_pkg::DL_CELLS,
  parameter int unsigned NCELLS_RING = dpfm_pkg::RING_CELLS,
  parameter int unsigned CTRL_W      = dpfm_pkg::CODE_W,
  parameter int unsigned T_RISE      = 128,
  parameter int unsigned T_STEP      = 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   trig,
  input  logic [CTRL_W-1:0]      dlb_sel,
  input  logic [CTRL_W-1:0]      fsw,
  output logic                   inj,
  output logic [NCELLS_RING-1:0] latch,
  output logic                   eor
);

  logic                   dlb_out;
  logic [NCELLS_RING-1:0] set_ev, rst_ev;

  delay_line #(.NCELLS(NCELLS_DL), .SEL_W(CTRL_W)) u_dlb (
    .clk, .rst_n, .start(trig), .sel(dlb_sel), .out(dlb_out)
  );

  // Injection latch: set by the trigger, reset by the delayed trigger.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       inj <= 1'b0;
    else if (trig)    inj <= 1'b1;
    else if (dlb_out) inj <= 1'b0;
  end

  ring_osc #(
    .NCELLS(NCELLS_RING), .CTRL_W(CTRL_W), .T_RISE(T_RISE), .T_STEP(T_STEP)
  ) u_ring (
    .clk, .rst_n, .inj, .fsw, .node(), .set_ev, .rst_ev
  );

  eor_detect #(.NCELLS(NCELLS_RING)) u_eor (
    .clk, .rst_n, .set_ev, .rst_ev, .latch, .eor
  );

endmodule
