// buck_dcm_model: behavioural model of a synchronous-free buck power stage
// (high-side switch, low-side diode, L, C, resistive load) for closed-loop
// simulation. Not synthesizable: it integrates the inductor current and
// capacitor voltage with real numbers by forward Euler, one step per clock
// period DT. While `gate` is high the inductor sees Vg - v; while it is low
// and current flows it sees -(v + VFD) through the diode; the current
// cannot go negative (discontinuous conduction). The load resistance and
// input voltage are inputs so a testbench can step them.
module buck_dcm_model #(
  parameter real DT  = 12.5e-9,
  parameter real L   = 1.0e-6,
  parameter real C   = 10.0e-6,
  parameter real VFD = 0.4,
  parameter real V0  = 1.8
) (
  input  logic clk,
  input  logic gate,
  input  real  vg,
  input  real  r_load,
  output real  v_out,
  output real  i_l
);
  initial begin
    v_out = V0;
    i_l   = 0.0;
  end

  always @(posedge clk) begin
    real di, dv;
    if (gate)           di = (vg - v_out) / L * DT;
    else if (i_l > 0.0) di = -(v_out + VFD) / L * DT;
    else                di = 0.0;
    dv    = (i_l - v_out / r_load) / C * DT;
    i_l   = (i_l + di > 0.0) ? i_l + di : 0.0;
    v_out = v_out + dv;
  end
endmodule
