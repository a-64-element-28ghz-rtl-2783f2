// Mux-based bitstream beamformer: one partial-array beam from the channel bitstreams.
//
// Works on the un-decimated ADC output. The IF sits at a quarter of the 4GHz sample rate,
// so quadrature downconversion multiplies sample n by j^-n, i.e. the sequences
// cos = 1,0,-1,0 and sin = 0,1,0,-1. Rotating the resulting baseband sample z = I + jQ by the
// channel weight w = wc + j*ws then needs no multiplier: in each cycle exactly one of I, Q is
// non-zero and equals +-y, so each output is +-y times wc or ws:
//   n=0: ( y*wc,  y*ws)   n=1: ( y*ws, -y*wc)   n=2: (-y*wc, -y*ws)   n=3: (-y*ws,  y*wc)
// With y in {-2..2} the product is a shift and a negation. The rotated I and Q of all
// channels are summed into the beam. The fs/4 downconversion, weight rotation and channel
// sum follow the document; the sign conventions and widths are this design's choice.
//
// Interface: y[c] is the combined sample of channel c, wc/ws the weights of this beam,
// nphase the sample index mod 4 (must be the same on all chiplets: it fixes I/Q polarity).
// Timing: one register, latency 1 cycle, one sample per cycle.
module bitstream_beamformer
  import bf_pkg::*;
#(
  parameter int NCH   = NUM_CH,
  parameter int WW    = WEIGHT_W,
  parameter int OUT_W = WW + 1 + $clog2(NCH)
)(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [1:0]              nphase,
  input  samp_t                   y  [NCH],
  input  logic signed [WW-1:0]    wc [NCH],
  input  logic signed [WW-1:0]    ws [NCH],
  output logic signed [OUT_W-1:0] beam_i,
  output logic signed [OUT_W-1:0] beam_q
);
  // y * w for y in -2..2, as a selection of w, 2w, their negations or zero
  function automatic logic signed [OUT_W-1:0] mux_mul(input samp_t s,
                                                      input logic signed [WW-1:0] w);
    logic signed [OUT_W-1:0] we;
    we = OUT_W'(w);
    unique case (s)
      3'sd1:   return we;
      3'sd2:   return we <<< 1;
      -3'sd1:  return -we;
      -3'sd2:  return -(we <<< 1);
      default: return '0;
    endcase
  endfunction

  logic signed [OUT_W-1:0] sum_i, sum_q;

  always_comb begin
    sum_i = '0;
    sum_q = '0;
    for (int c = 0; c < NCH; c++) begin
      unique case (nphase)
        2'd0: begin sum_i += mux_mul(y[c], wc[c]);  sum_q += mux_mul(y[c], ws[c]);  end
        2'd1: begin sum_i += mux_mul(y[c], ws[c]);  sum_q -= mux_mul(y[c], wc[c]);  end
        2'd2: begin sum_i -= mux_mul(y[c], wc[c]);  sum_q -= mux_mul(y[c], ws[c]);  end
        default: begin sum_i -= mux_mul(y[c], ws[c]); sum_q += mux_mul(y[c], wc[c]); end
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      beam_i <= '0;
      beam_q <= '0;
    end else begin
      beam_i <= sum_i;
      beam_q <= sum_q;
    end
  end
endmodule
