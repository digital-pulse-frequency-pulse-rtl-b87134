// ton_opt: on-time optimization for minimum converter losses.
//
// In discontinuous conduction a buck converter's losses are roughly
// a * T_on + b / T_on**2 at a fixed load and output voltage: conduction loss
// grows with the on-time, while switching loss (Q_r * V_g per cycle) falls
// because a longer on-time needs fewer cycles. The minimum is at
//     T_on,opt**3 = 6 Q_r V_g L**2 /
//                   (R_on,h (V_g - V)**2 + R_on,l (V_g - V)**3 / V)
// (R_on,l = 0 for a low-side diode). V_g is not measured: it is estimated
// from the DCM conversion ratio,
//     V_g = V/2 * (1 + sqrt(1 + 8 L T_sw / (R T_on**2))),
// with the load resistance taken as proportional to the switching period,
// R = R_PER_TSW * T_sw. With that estimate T_sw cancels, so the estimate,
// and with it the optimum, depends on the present on-time alone. The whole
// chain is evaluated at elaboration into a 2**CODE_W entry table that maps
// the present t_on code to its optimum code: the prestored information the
// loop uses.
//
// Once per switching cycle (ce = f_clk) a counter runs; every UPDATE_CYCLES
// cycles t_on moves one code toward the table entry for the present t_on, so
// the on-time changes slowly against the frequency loop. With opt_en low
// t_on is held at TON_FIXED, the fixed on-time of a conventional PFM.
//
// The loss model and both equations follow the controller description; the
// converter values, the proportionality constant, the one-code step and
// the update interval are this design's choices. An on-time code k means
// (k + 1) * TCELL seconds.
//
// Ports: ce is the once-per-cycle enable, opt_en selects the optimized (1)
// or fixed (0) on-time, t_on is the registered on-time word t_on[n]. Timing:
// t_on changes one clock period after the ce pulse that ends an interval,
// and after the first ce pulse with opt_en low.
module ton_opt #(
  parameter int unsigned CODE_W        = dpfm_pkg::CODE_W,
  parameter real         TCELL         = real'(dpfm_pkg::TCELL_PS) * 1.0e-12, // delay cell, s
  parameter real         VOUT          = 1.8,     // regulated output, V
  parameter real         L_H           = 1.0e-6,  // inductance, H
  parameter real         QR            = 1.0e-9,  // switched charge per cycle, C
  parameter real         RON_H         = 0.3,     // high-side on-resistance, ohm
  parameter real         RON_L         = 0.0,     // low-side on-resistance, ohm (0: diode)
  parameter real         R_PER_TSW     = 1.6e7,   // load estimate per second of T_sw, ohm/s
  parameter int unsigned UPDATE_CYCLES = 16,
  parameter int unsigned TON_FIXED     = 15
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ce,
  input  logic              opt_en,
  output logic [CODE_W-1:0] t_on
);

  localparam int unsigned NCODE = 2 ** CODE_W;
  localparam int unsigned CNT_W = $clog2(UPDATE_CYCLES + 1);

  typedef logic [CODE_W-1:0] tab_t [NCODE];

  function automatic tab_t fill_table();
    tab_t t;
    for (int k = 0; k < int'(NCODE); k++) begin
      real ton, vg, den, topt, c;
      ton  = real'(k + 1) * TCELL;
      vg   = VOUT / 2.0 * (1.0 + $sqrt(1.0 + 8.0 * L_H / (R_PER_TSW * ton * ton)));
      den  = RON_H * (vg - VOUT) ** 2 + RON_L * (vg - VOUT) ** 3 / VOUT;
      topt = (6.0 * QR * vg * L_H * L_H / den) ** (1.0 / 3.0);
      c    = topt / TCELL - 1.0;
      if (c < 0.0)                  t[k] = '0;
      else if (c > real'(NCODE - 1)) t[k] = CODE_W'(NCODE - 1);
      else                          t[k] = CODE_W'($rtoi(c + 0.5));
    end
    return t;
  endfunction

  localparam tab_t OPT_TABLE = fill_table();

  logic [CNT_W-1:0]  cnt;
  logic [CODE_W-1:0] target;

  assign target = OPT_TABLE[t_on];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t_on <= CODE_W'(TON_FIXED);
      cnt  <= '0;
    end else if (ce) begin
      if (!opt_en) begin
        t_on <= CODE_W'(TON_FIXED);
        cnt  <= '0;
      end else if (cnt == CNT_W'(UPDATE_CYCLES - 1)) begin
        cnt <= '0;
        if (target > t_on)      t_on <= t_on + 1'b1;
        else if (target < t_on) t_on <= t_on - 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

endmodule
