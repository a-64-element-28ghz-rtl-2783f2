// Behavioural model of one bandpass delta-sigma sub-ADC (not synthesizable logic).
//
// Samples a real-valued IF input on the selected clock edge and produces a 1-bit output
// whose quantization noise is shaped away from fs/4 (noise transfer function 1 + z^-2,
// i.e. notches at +-fs/4, where the 1GHz IF sits at a 4GHz sample rate). Error-feedback
// form: v = x + e[n-2], q = sign(v), e[n] = q - v. Stable for |x| below about 0.8.
// NEGEDGE = 1 models the sub-ADC clocked on the falling edge.
module ctbpdsm_model #(
  parameter bit NEGEDGE = 0
)(
  input  logic clk,
  input  real  vin,
  output logic dout
);
  real e1 = 0.0, e2 = 0.0, v;
  initial dout = 1'b0;

  always @(posedge clk or negedge clk) if (clk != NEGEDGE) begin
    v    = vin + e2;
    dout <= (v >= 0.0);
    e2   = e1;
    e1   = ((v >= 0.0) ? 1.0 : -1.0) - v;
  end
endmodule
