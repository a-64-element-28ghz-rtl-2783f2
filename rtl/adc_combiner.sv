// Sub-ADC combiner of one channel stripe.
//
// Each channel has two single-bit continuous-time bandpass delta-sigma sub-ADCs, one clocked
// on the rising and one on the falling 4GHz edge. Adding their outputs forms a two-tap FIR
// that notches the sampling-clock crosstalk and doubles the signal (6dB gain). In low-power
// mode only sub-ADC A is used. Bits are mapped 1 -> +1, 0 -> -1, so the combined sample is
// -2/0/+2 in dual mode and -1/+1 in single mode (this mapping is a design choice).
//
// Interface: adc_a is the rising-edge sub-ADC bit, adc_b the falling-edge bit already
// retimed into the rising-edge domain. dual_mode selects both sub-ADCs.
// Timing: one register, latency 1 cycle, one sample per cycle.
module adc_combiner
  import bf_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  dual_mode,
  input  logic  adc_a,
  input  logic  adc_b,
  output samp_t y
);
  samp_t a_val, b_val;

  always_comb begin
    a_val = adc_a ? samp_t'(1) : samp_t'(-1);
    b_val = adc_b ? samp_t'(1) : samp_t'(-1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         y <= '0;
    else if (dual_mode) y <= a_val + b_val;
    else                y <= a_val;
  end
endmodule
