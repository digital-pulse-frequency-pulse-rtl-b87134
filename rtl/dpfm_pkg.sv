// dpfm_pkg: types and constants shared by the DPFM/DPAM controller.
//
// The controller is built as a synchronous circuit on one timing clock
// (tclk). One period of tclk is the delay of one delay cell; with the
// assumed 80 MHz tclk this is 12.5 ns, so the 32-cell on-time delay line
// spans 12.5 ns to 400 ns. Both modulator control words, t_on[n] and
// f_sw[n], are 5 bits wide as in the modulator description; the error
// word e[n] from the converter's ADC is an assumed 4-bit two's-complement
// value.
package dpfm_pkg;

  // Width of the two modulator control words.
  localparam int unsigned CODE_W = 5;
  // Delay cells per programmable delay line.
  localparam int unsigned DL_CELLS = 32;
  // Cells (and S-R latches) in the race ring oscillator.
  localparam int unsigned RING_CELLS = 5;
  // Width of the error word e[n].
  localparam int unsigned ERR_W = 4;
  // Assumed delay of one delay cell (tclk period) in picoseconds.
  localparam int unsigned TCELL_PS = 12500;

  typedef logic [CODE_W-1:0]        code_t;
  typedef logic signed [ERR_W-1:0]  err_t;

endpackage
