// delay_line: programmable delay line of NCELLS delay cells and a tap
// multiplexer.
//
// A start pulse on `start` walks down a chain of NCELLS delay cells, one
// stage per tclk period; the multiplexer picks the output of stage `sel`, so
// `out` repeats the start pulse (sel + 1) clock periods later. The
// structure (32 cells behind one multiplexer, a 5-bit select) follows the
// modulator description; making each stage one register stage of a timing
// clock, rather than an analog gate delay, is this design's choice, so the
// delay is exact and independent of process and temperature.
//
// Timing: start high in cycle t gives out high in cycle t + 1 + sel. The
// multiplexer is combinational from `sel`, so sel must be held while a
// pulse is in flight (the modulator registers it at the trigger).
module delay_line #(
  parameter int unsigned NCELLS = dpfm_pkg::DL_CELLS,
  parameter int unsigned SEL_W  = $clog2(NCELLS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [SEL_W-1:0] sel,
  output logic             out
);

  logic [NCELLS-1:0] stage;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) stage <= '0;
    else        stage <= {stage[NCELLS-2:0], start};
  end

  // Tap multiplexer; codes beyond the last stage select the last stage.
  always_comb begin
    if (32'(sel) < NCELLS) out = stage[sel];
    else                   out = stage[NCELLS-1];
  end

endmodule
