// Reference model of one chiplet's local beam path, for testbenches.
//
// Observes the same inputs the chiplet sees at each rising clock edge (sub-ADC bits, mode,
// the chiplet's divider phase and frame parity) and computes, with real-valued weights
// round(127*cos/sin(2*pi*code/1024)) and complex arithmetic, the words the chiplet should
// produce: the 16-channel beam after fs/4 downconversion and rotation, the second-order
// CIC response as an explicit triangular weighting of the beam history, the 2^-10 scaling
// with saturation, and the I/Q choice of the frame. On each decimation (phase 0) it pulses
// exp_valid with the four words in exp_w (I or Q by parity) and both components.
module chiplet_ref_model
  import bf_pkg::*;
#(
  parameter int OUT_SHIFT = 10
)(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               dual_mode,
  input  logic               iq_phase,
  input  logic [3:0]         phase,
  input  logic               frame_par,
  input  phase_t             codes [NUM_BEAMS][NUM_CH],
  input  logic [NUM_CH-1:0]  adc_a,
  input  logic [NUM_CH-1:0]  adc_b,
  output int                 exp_w [NUM_BEAMS],
  output int                 exp_i [NUM_BEAMS],
  output int                 exp_q [NUM_BEAMS],
  output logic               exp_valid
);
  localparam int R = FRAME_LEN;
  localparam int HL = 64;                   // history length (>= 2R+2)
  int   y_prev [NUM_CH];
  int   hi [NUM_BEAMS][HL];
  int   hq [NUM_BEAMS][HL];
  longint q = 0;

  function automatic int sat13(longint v);
    return v > 4095 ? 4095 : (v < -4096 ? -4096 : int'(v));
  endfunction

  function automatic longint g(longint a);
    longint f0, f1, f2;
    f0 = a > 0 ? a : 0;
    f1 = (a - R) > 0 ? a - R : 0;
    f2 = (a - 2*R) > 0 ? a - 2*R : 0;
    return f0 - 2*f1 + f2;
  endfunction

  initial begin
    exp_valid = 0;
    foreach (y_prev[c]) y_prev[c] = 0;
    foreach (hi[b, k]) begin hi[b][k] = 0; hq[b][k] = 0; end
  end

  real th, zr, zi, wr, wi;
  int  ycur [NUM_CH];
  longint si, sq;
  int  wci, wsi, bi, bq;

  always @(posedge clk) begin
    exp_valid <= 1'b0;
    if (!rst_n) begin
      foreach (y_prev[c]) y_prev[c] = 0;
      foreach (hi[b, k]) begin hi[b][k] = 0; hq[b][k] = 0; end
    end else begin
      for (int c = 0; c < NUM_CH; c++)
        ycur[c] = (adc_a[c] ? 1 : -1) + (dual_mode ? (adc_b[c] ? 1 : -1) : 0);
      // beam value the chiplet holds during cycle q+1
      for (int b = 0; b < NUM_BEAMS; b++) begin
        bi = 0; bq = 0;
        for (int c = 0; c < NUM_CH; c++) begin
          th  = 2.0 * 3.14159265358979 * real'(codes[b][c]) / 1024.0;
          wci = int'($floor(127.0 * $cos(th) + 0.5));
          wsi = int'($floor(127.0 * $sin(th) + 0.5));
          // z = y * exp(-j*pi*n/2)
          th = -3.14159265358979 / 2.0 * real'(phase[1:0]);
          zr = real'(y_prev[c]) * $cos(th);
          zi = real'(y_prev[c]) * $sin(th);
          wr = real'(wci); wi = real'(wsi);
          bi += int'($floor(zr * wr - zi * wi + 0.5));
          bq += int'($floor(zr * wi + zi * wr + 0.5));
        end
        hi[b][int'((q + 1) % HL)] = bi;
        hq[b][int'((q + 1) % HL)] = bq;
      end
      if (phase == 4'd0) begin
        for (int b = 0; b < NUM_BEAMS; b++) begin
          si = 0; sq = 0;
          for (longint v = q - 2*R; v <= q - 2; v++) begin
            if (v >= 0) begin
              si += longint'(hi[b][int'(v % HL)]) * g(q - 1 - v);
              sq += longint'(hq[b][int'(v % HL)]) * g(q - 1 - v);
            end
          end
          exp_i[b] <= sat13(si >>> OUT_SHIFT);
          exp_q[b] <= sat13(sq >>> OUT_SHIFT);
          exp_w[b] <= (frame_par ^ iq_phase) ? sat13(sq >>> OUT_SHIFT) : sat13(si >>> OUT_SHIFT);
        end
        exp_valid <= 1'b1;
      end
      y_prev = ycur;
      q++;
    end
  end
endmodule
