// Tileable 16-element, 4-beam digital beamforming chiplet (digital part).
//
// Receive path: each of the 16 channels delivers the bitstreams of two bandpass
// delta-sigma sub-ADCs sampling a 1GHz IF at 4GHz. adc_combiner forms one sample per cycle;
// for each of the 4 beams a bitstream_beamformer downconverts all channels to I/Q, rotates
// them by the beam's per-channel weights (phase_weight_lut, 10-bit phase codes) and sums
// them into a 16-element partial beam. CIC decimators reduce each beam's I and Q to one
// value per 250MHz frame; they are scaled by 2^-OUT_SHIFT and saturated to 13-bit words.
//
// Chain: each frame carries one 13-bit word per beam (the four beam-space outputs). I and Q
// are sent on alternate frames; iq_phase sets which frame parity carries Q so that all
// chiplets agree. The local words go through beam_align_fifo, whose calibrated delay lines
// them up with the partial beams received from the previous chiplet (saib_rx); beam_summer
// adds both and saib_tx sends the sum to the next chiplet. The first chiplet (first = 1)
// adds nothing; the last one's output is the full-array beam.
//
// Clocking: everything runs on the shared 4GHz reference. mc_dpll aligns this chiplet's
// clock divider with the previous chiplet (follower) and measures the next one (leader).
// All link and loop-back inputs are captured in input registers and outputs leave from
// registers, so both directions of a chip-to-chip hop have the same latency.
//
// Follows the document: channel and beam counts, sub-ADC combining modes, mux-based
// bitstream processing, FIFO alignment and summation, 13-lane 4:1 Streaming-AIB,
// leader/follower clock synchronization. This design's choices: CIC decimation, scaling,
// I/Q interleaving over frames, frame phases at which data moves, saturation.
module bf_chiplet
  import bf_pkg::*;
#(
  parameter int NCH       = NUM_CH,
  parameter int NB        = NUM_BEAMS,
  parameter int FIFO_DEPTH = 16,
  parameter int OUT_SHIFT = 10,
  parameter int AVG_LOG2  = 4
)(
  input  logic        clk,          // 4GHz reference
  input  logic        rst_n,
  // configuration
  input  logic        first,        // first chiplet of the chain (leader only)
  input  logic        dual_mode,    // 1: both sub-ADCs, 0: low-power single sub-ADC
  input  logic        tx_boost,     // transmit driver boost (last chiplet to FPGA)
  input  logic        iq_phase,
  input  logic [$clog2(FIFO_DEPTH)-1:0] fifo_delay,
  input  phase_t      phase_code [NB][NCH],
  // sub-ADC bitstreams
  input  logic [NCH-1:0] adc_a,
  input  logic [NCH-1:0] adc_b,
  // Streaming-AIB
  input  saib_link_t  link_in,
  output saib_link_t  link_out,
  output logic        drv_boost,
  // multi-chip clock synchronization
  input  logic [2:0]  sync_code_in,
  output logic [2:0]  sync_code_out,
  input  logic        sync_lb_in,
  output logic        sync_lb_out,
  // status
  output logic [3:0]  div_phase,
  output logic        frame_par,
  output logic        sync_locked,
  output logic        sync_jump,
  output logic        sync_update,
  output logic        rx_valid
);
  localparam int BF_W  = WEIGHT_W + 1 + $clog2(NCH);
  localparam int CIC_R = FRAME_LEN;
  localparam int CIC_W = BF_W + 2 * $clog2(CIC_R);

  // ---------------- input/output registers of the chip-to-chip signals
  saib_link_t link_in_q;
  logic       lb_in_q, lb_out_c;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      link_in_q   <= '0;
      lb_in_q     <= 1'b0;
      sync_lb_out <= 1'b0;
    end else begin
      link_in_q   <= link_in;
      lb_in_q     <= sync_lb_in;
      sync_lb_out <= lb_out_c;
    end
  end

  // ---------------- clock synchronization
  logic [3:0] phase;
  logic       clk250_unused, clk1g_unused;

  mc_dpll #(.AVG_LOG2(AVG_LOG2)) u_dpll (
    .clk, .rst_n, .follow(~first), .rx_clk250(link_in_q.clk250), .code_in(sync_code_in),
    .lb_out(lb_out_c), .lb_in(lb_in_q), .code_out(sync_code_out), .locked(sync_locked),
    .code_update(sync_update), .phase, .clk250(clk250_unused), .clk1g(clk1g_unused),
    .frame_par, .jump(sync_jump));

  assign div_phase = phase;

  // ---------------- channel combining
  samp_t y [NCH];
  for (genvar c = 0; c < NCH; c++) begin : g_ch
    adc_combiner u_comb (.clk, .rst_n, .dual_mode, .adc_a(adc_a[c]), .adc_b(adc_b[c]), .y(y[c]));
  end

  // ---------------- beams
  logic dump;
  assign dump = (phase == 4'd0);

  beam_word_t [NB-1:0] word_i, word_q, local_w;
  logic                cic_valid [NB];

  for (genvar b = 0; b < NB; b++) begin : g_beam
    weight_t wc [NCH];
    weight_t ws [NCH];
    logic signed [BF_W-1:0]  bi, bq;
    logic signed [CIC_W-1:0] di, dq;
    logic                    vq_unused;

    for (genvar c = 0; c < NCH; c++) begin : g_w
      phase_weight_lut u_lut (.phase(phase_code[b][c]), .wc(wc[c]), .ws(ws[c]));
    end

    bitstream_beamformer #(.NCH(NCH)) u_bf (
      .clk, .rst_n, .nphase(phase[1:0]), .y, .wc, .ws, .beam_i(bi), .beam_q(bq));

    cic_decimator #(.IN_W(BF_W), .R(CIC_R), .ORDER(2)) u_cic_i (
      .clk, .rst_n, .din(bi), .dump, .dout(di), .out_valid(cic_valid[b]));
    cic_decimator #(.IN_W(BF_W), .R(CIC_R), .ORDER(2)) u_cic_q (
      .clk, .rst_n, .din(bq), .dump, .dout(dq), .out_valid(vq_unused));

    assign word_i[b]  = sat_word(32'(di >>> OUT_SHIFT));
    assign word_q[b]  = sat_word(32'(dq >>> OUT_SHIFT));
    assign local_w[b] = (frame_par ^ iq_phase) ? word_q[b] : word_i[b];
  end

  // ---------------- alignment, summation, link
  beam_word_t [NB-1:0] fifo_w, rx_w, sum_w;

  beam_align_fifo #(.W(LANES), .NW(NB), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .wr(cic_valid[0]), .din(local_w), .delay(fifo_delay), .dout(fifo_w));

  saib_rx u_rx (.clk, .rst_n, .link(link_in_q), .words(rx_w), .valid(rx_valid));

  beam_summer #(.NW(NB)) u_sum (
    .clk, .rst_n, .load(phase == 4'd14), .first, .local_w(fifo_w), .rx_w, .sum_w);

  saib_tx u_tx (.clk, .rst_n, .phase, .words(sum_w), .boost(tx_boost), .link(link_out),
                .drv_boost);
endmodule
