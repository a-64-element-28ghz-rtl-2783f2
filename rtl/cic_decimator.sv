// Cascaded integrator-comb decimator for one beam component (I or Q).
//
// Brings the 4GHz beam sum down to one sample per 250MHz frame (R = 16). ORDER integrators
// run every cycle; when the frame strobe `dump` is high, the last integrator is sampled and
// ORDER comb (difference) stages produce the output, so the response is a sinc^ORDER
// average over the last ORDER*R inputs with DC gain R^ORDER. The dump strobe comes from the
// synchronized clock divider, so all chiplets decimate on the same sample boundaries.
// The document names neither the decimator nor its type; a CIC is this design's choice as
// the simplest filter that does the rate change. Wrap-around in the integrators is harmless
// because OUT_W covers the full gain.
//
// Timing: out is updated in the cycle after dump and held for the frame; out_valid pulses.
module cic_decimator #(
  parameter int IN_W  = 13,
  parameter int R     = 16,
  parameter int ORDER = 2,
  parameter int OUT_W = IN_W + ORDER * $clog2(R)
)(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [IN_W-1:0]  din,
  input  logic                    dump,
  output logic signed [OUT_W-1:0] dout,
  output logic                    out_valid
);
  logic signed [OUT_W-1:0] integ [ORDER];
  logic signed [OUT_W-1:0] dly   [ORDER];   // previous input of each comb stage
  logic signed [OUT_W-1:0] comb  [ORDER+1];

  always_comb begin
    comb[0] = integ[ORDER-1];
    for (int k = 0; k < ORDER; k++) comb[k+1] = comb[k] - dly[k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < ORDER; k++) begin
        integ[k] <= '0;
        dly[k]   <= '0;
      end
      dout      <= '0;
      out_valid <= 1'b0;
    end else begin
      integ[0] <= integ[0] + OUT_W'(din);
      for (int k = 1; k < ORDER; k++) integ[k] <= integ[k] + integ[k-1];
      out_valid <= dump;
      if (dump) begin
        for (int k = 0; k < ORDER; k++) dly[k] <= comb[k];
        dout <= comb[ORDER];
      end
    end
  end
endmodule
