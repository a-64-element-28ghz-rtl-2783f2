// Phase-code to complex-weight conversion for one channel of one beam.
//
// The 10-bit phase code p selects the angle theta = 2*pi*p/1024. The outputs are
// wc = round(A*cos(theta)) and ws = round(A*sin(theta)) with A = 2^(WEIGHT_W-1)-1, the
// weight pair the bitstream beamformer muxes to phase-rotate I and Q. Only a quarter-wave
// sine table of 2^(PHASE_W-2)+1 entries is built; quadrant symmetry gives the rest. The
// table is computed at elaboration from a Taylor series of sin(x) to x^15 in Q30 fixed
// point (error far below one weight LSB), so no data file is needed.
//
// The 10-bit phase resolution follows the document; the weight width and the table method
// are this design's choice. Purely combinational.
module phase_weight_lut
  import bf_pkg::*;
#(
  parameter int PW = PHASE_W,
  parameter int WW = WEIGHT_W
)(
  input  logic [PW-1:0]        phase,
  output logic signed [WW-1:0] wc,
  output logic signed [WW-1:0] ws
);
  localparam int QN  = 1 << (PW-2);            // entries per quadrant
  localparam int AMP = (1 << (WW-1)) - 1;

  // round(AMP * sin(i*pi/(2*QN))), i = 0..QN
  function automatic int quarter_sine(input int i);
    longint pi_q30, x, x2, term, acc;
    pi_q30 = 64'd3373259426;                     // pi * 2^30
    x      = (longint'(i) * pi_q30) / (2 * QN);
    x2     = (x * x) >>> 30;
    term   = x;
    acc    = x;
    for (int n = 1; n <= 7; n++) begin
      term = -((term * x2) >>> 30) / longint'((2*n) * (2*n + 1));
      acc  = acc + term;
    end
    return int'((acc * AMP + (64'd1 << 29)) >>> 30);
  endfunction

  logic [WW-1:0] qtab [QN+1];
  for (genvar i = 0; i <= QN; i++) begin : g_tab
    localparam int V = quarter_sine(i);
    assign qtab[i] = WW'(V);
  end

  // Quadrant symmetry: sin(t) = +-S(r) or +-S(QN-r) for t = quadrant*QN + r.
  function automatic logic [PW-2:0] tab_index(input logic [PW-1:0] p);
    logic [PW-2:0] r;
    r = {1'b0, p[PW-3:0]};
    return p[PW-2] ? (PW-1)'(QN) - r : r;
  endfunction

  logic [PW-1:0] phase_cos;
  logic [WW-1:0] mag_s, mag_c;

  always_comb begin
    phase_cos = phase + PW'(QN);               // cos(t) = sin(t + pi/2)
    mag_s = qtab[tab_index(phase)];
    mag_c = qtab[tab_index(phase_cos)];
    ws = phase[PW-1]     ? -$signed(mag_s) : $signed(mag_s);
    wc = phase_cos[PW-1] ? -$signed(mag_c) : $signed(mag_c);
  end
endmodule
