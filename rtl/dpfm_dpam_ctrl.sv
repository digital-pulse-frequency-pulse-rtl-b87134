// dpfm_dpam_ctrl: digital DPFM/DPAM controller for a DCM buck converter.
//
// The error e[n] between the converter output and its reference (from an
// external low-power ADC) feeds a look-up-table PI compensator, whose
// output is the switching-frequency word f_sw[n], and the on-time
// optimizer, whose output t_on[n] sets the switch on-time (the inductor
// peak current). The DPFM/DPAM modulator turns both words into the switch
// drive `gate` and produces f_clk, one pulse per switching cycle, which is
// the only time the compensator and optimizer act: the controller runs at
// the switching rate. As described for the modulator, t_on[n] sets both
// delay line A (on-time) and delay line B (race pulse width), and f_sw[n]
// programs the ring cells, so a longer on-time also lengthens the period.
//
// Ports: en starts and stops switching; opt_en selects the optimized
// on-time (1) or a fixed one (0, conventional PFM); e is the ADC error;
// gate drives the high-side switch; f_clk, t_on and fsw are brought out for
// observation. Everything runs on the one timing clock clk (assumed
// 80 MHz, one delay cell per period); e is sampled at f_clk.
module dpfm_dpam_ctrl
  import dpfm_pkg::*;
#(
  parameter int unsigned T_RISE = 128
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  logic  opt_en,
  input  err_t  e,
  output logic  gate,
  output logic  f_clk,
  output code_t t_on,
  output code_t fsw
);

  pi_lut u_pi (
    .clk, .rst_n, .ce(f_clk), .e, .fsw
  );

  ton_opt u_ton (
    .clk, .rst_n, .ce(f_clk), .opt_en, .t_on
  );

  dpfm_dpam #(.T_RISE(T_RISE)) u_mod (
    .clk, .rst_n, .en, .t_on, .dlb_sel(t_on), .fsw, .gate, .f_clk, .eor()
  );

endmodule
