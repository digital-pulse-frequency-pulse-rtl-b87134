// pi_lut: look-up-table based digital PI compensator.
//
// Once per switching cycle (ce = f_clk) it updates the control variable in
// velocity form,
//     u[n] = u[n-1] + LUT_A[e[n]] + LUT_B[e[n-1]],
//     LUT_A[e] = (KP + KI) * e,   LUT_B[e] = -KP * e,
// with no multiplier: the error word from the windowed ADC has only
// 2**ERR_W values, so both products are read from two small tables that are
// filled at elaboration from the gains. u carries FRAC fraction bits and is
// clamped to the range of the modulator's frequency word; the integer part
// is the output fsw (f_sw[n]). A positive error (output below reference)
// raises fsw, which shortens the switching period.
//
// A look-up-table PI compensator driving the switching frequency is what
// the controller description specifies; the velocity form, the gains, the
// fraction bits, the clamp and the start value U_INIT are this design's
// choices. Timing: fsw changes one clock period after a ce pulse.
module pi_lut #(
  parameter int unsigned ERR_W  = dpfm_pkg::ERR_W,
  parameter int unsigned OUT_W  = dpfm_pkg::CODE_W,
  parameter int unsigned FRAC   = 4,
  parameter int          KP_Q   = 6,   // proportional gain, units of 2**-FRAC
  parameter int          KI_Q   = 2,   // integral gain, units of 2**-FRAC
  parameter int unsigned U_INIT = 8    // start value of fsw
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    ce,
  input  logic signed [ERR_W-1:0] e,
  output logic [OUT_W-1:0]        fsw
);

  localparam int unsigned NE  = 2 ** ERR_W;
  localparam int unsigned U_W = OUT_W + FRAC + 1;     // plus sign bit
  localparam int          UMAX = 2 ** (OUT_W + FRAC) - 1;
  localparam int          LUT_W = 16;

  typedef logic signed [LUT_W-1:0] lut_t [NE];

  function automatic lut_t fill_lut(int gain);
    lut_t t;
    for (int i = 0; i < int'(NE); i++) begin
      // Index i holds e = i read as an ERR_W-bit two's-complement number.
      int ev = (i >= int'(NE) / 2) ? i - int'(NE) : i;
      t[i] = LUT_W'(gain * ev);
    end
    return t;
  endfunction

  localparam lut_t LUT_A = fill_lut(KP_Q + KI_Q);
  localparam lut_t LUT_B = fill_lut(-KP_Q);

  logic signed [U_W-1:0]   u;
  logic signed [ERR_W-1:0] e_prev;
  logic signed [LUT_W+1:0] u_sum;

  always_comb begin
    u_sum = (LUT_W+2)'(u) + (LUT_W+2)'(LUT_A[e]) + (LUT_W+2)'(LUT_B[e_prev]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      u      <= U_W'(U_INIT << FRAC);
      e_prev <= '0;
    end else if (ce) begin
      e_prev <= e;
      if (u_sum < 0)                u <= '0;
      else if (u_sum > (LUT_W+2)'(UMAX)) u <= U_W'(UMAX);
      else                          u <= U_W'(u_sum);
    end
  end

  assign fsw = u[FRAC +: OUT_W];

endmodule
