// 64-element digital beamforming module: NUM_CHIPLETS identical chiplets in a daisy chain.
//
// Each chiplet serves its own 16-element sub-array and forms four partial beams. Chiplet 0
// starts the chain; each following chiplet adds its partial beams to those received from
// its predecessor over a Streaming-AIB link, and the last chiplet's link carries the four
// fully formed beams off the module (to an FPGA, with transmit boost). On the module the
// chiplets sit in a spiral, each rotated 90 degrees from the previous one, so that one
// transmit and one receive port per die line up; in logic that placement is exactly this
// chain. Each neighbouring pair also runs the leader/follower clock synchronization: the
// forwarded 250MHz clock goes down the chain, the loop-back clock and the delay code go
// back up. All chiplets share the 4GHz reference (distributed by an H-tree on the module)
// but may leave reset at different times.
//
// Interface: per-chiplet resets, configuration and sub-ADC bitstreams in; the final link
// and per-chiplet status out. The last chiplet leads no follower, so its sync_locked and
// sync_update stay 0. Chip-to-chip links are wired directly (each hop has the two
// chiplets' I/O registers as its latency). The chain and its size follow the document.
module bf_module_top
  import bf_pkg::*;
#(
  parameter int NUM_CHIPLETS = 4,
  parameter int FIFO_DEPTH   = 16
)(
  input  logic        clk,
  input  logic [NUM_CHIPLETS-1:0] rst_n,
  input  logic        dual_mode,
  input  logic [NUM_CHIPLETS-1:0] tx_boost,
  input  logic [NUM_CHIPLETS-1:0] iq_phase,
  input  logic [NUM_CHIPLETS-1:0][$clog2(FIFO_DEPTH)-1:0] fifo_delay,
  input  phase_t      phase_code [NUM_CHIPLETS][NUM_BEAMS][NUM_CH],
  input  logic [NUM_CHIPLETS-1:0][NUM_CH-1:0] adc_a,
  input  logic [NUM_CHIPLETS-1:0][NUM_CH-1:0] adc_b,
  output saib_link_t  beam_link,
  output logic        beam_link_boost,
  output logic [NUM_CHIPLETS-1:0][3:0] div_phase,
  output logic [NUM_CHIPLETS-1:0] frame_par,
  output logic [NUM_CHIPLETS-1:0] sync_locked,
  output logic [NUM_CHIPLETS-1:0] sync_jump,
  output logic [NUM_CHIPLETS-1:0] sync_update,
  output logic [NUM_CHIPLETS-1:0] rx_valid
);
  saib_link_t link [NUM_CHIPLETS+1];
  logic [2:0] code [NUM_CHIPLETS+1];
  logic       lb   [NUM_CHIPLETS+1];     // lb[k]: loop-back from chiplet k to chiplet k-1
  logic [NUM_CHIPLETS-1:0] boost;

  assign link[0] = '0;
  assign code[0] = '0;
  assign lb[NUM_CHIPLETS] = 1'b0;

  for (genvar k = 0; k < NUM_CHIPLETS; k++) begin : g_chip
    bf_chiplet #(.FIFO_DEPTH(FIFO_DEPTH)) u_chip (
      .clk, .rst_n(rst_n[k]), .first(k == 0), .dual_mode, .tx_boost(tx_boost[k]),
      .iq_phase(iq_phase[k]), .fifo_delay(fifo_delay[k]), .phase_code(phase_code[k]),
      .adc_a(adc_a[k]), .adc_b(adc_b[k]),
      .link_in(link[k]), .link_out(link[k+1]), .drv_boost(boost[k]),
      .sync_code_in(code[k]), .sync_code_out(code[k+1]),
      .sync_lb_in(lb[k+1]), .sync_lb_out(lb[k]),
      .div_phase(div_phase[k]), .frame_par(frame_par[k]), .sync_locked(sync_locked[k]),
      .sync_jump(sync_jump[k]), .sync_update(sync_update[k]), .rx_valid(rx_valid[k]));
  end

  assign beam_link       = link[NUM_CHIPLETS];
  assign beam_link_boost = boost[NUM_CHIPLETS-1];
endmodule
