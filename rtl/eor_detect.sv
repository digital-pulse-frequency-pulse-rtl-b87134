// eor_detect: end-of-race detector.
//
// One S-R latch per ring cell. A latch is set when the rising edge of the
// racing pulse enters its cell and reset when the falling edge leaves the
// cell or swallows the pulse there. As long as the pulse lives, at least
// one latch is high; when the falling edge has caught the rising edge all
// latches are low and the race is over. The detector is armed by the first
// latch set after a trigger and emits one `eor` pulse (one clock period)
// when it then finds every latch low; `eor` starts the next switching
// cycle.
//
// The latches and the all-low detection follow the modulator description;
// placing the set and reset points at the cell input and output, the arming
// flag and the registered one-period `eor` pulse are this design's choices.
// Timing: eor is high in the clock period after the one in which the last
// latch is reset.
module eor_detect #(
  parameter int unsigned NCELLS = dpfm_pkg::RING_CELLS
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NCELLS-1:0] set_ev,
  input  logic [NCELLS-1:0] rst_ev,
  output logic [NCELLS-1:0] latch,
  output logic              eor
);

  logic [NCELLS-1:0] latch_n;
  logic              armed;

  // Reset wins: a cell cannot be entered and left in the same period.
  assign latch_n = (latch | set_ev) & ~rst_ev;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      latch <= '0;
      armed <= 1'b0;
      eor   <= 1'b0;
    end else begin
      latch <= latch_n;
      eor   <= 1'b0;
      if (|set_ev) armed <= 1'b1;
      if ((armed || |set_ev) && latch_n == '0) begin
        armed <= 1'b0;
        eor   <= 1'b1;
      end
    end
  end

endmodule
