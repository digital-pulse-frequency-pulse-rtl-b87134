// adc_err_model: behavioural model of the converter's low-power error ADC.
// Not synthesizable. It quantizes the difference between the reference and
// the output voltage into a 4-bit two's-complement error word,
//     e = clamp(round((VREF - v) / LSB), -8, 7),
// updated on every clock edge, so the controller sees the value present at
// its f_clk enable.
module adc_err_model #(
  parameter real VREF = 1.8,
  parameter real LSB  = 0.01
) (
  input  logic              clk,
  input  real               v,
  output logic signed [3:0] e
);
  initial e = '0;
  always @(posedge clk) begin
    int q;
    q = $rtoi((VREF - v) / LSB + ((VREF - v) >= 0.0 ? 0.5 : -0.5));
    if (q > 7)  q = 7;
    if (q < -8) q = -8;
    e <= 4'(q);
  end
endmodule
