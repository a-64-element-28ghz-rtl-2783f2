// Multi-chip digital PLL of one chiplet: phase-aligns its clock divider with its neighbours.
//
// Chiplets synchronize in pairs along the chain. As a follower, this chiplet delays the
// 250MHz clock received from the previous chiplet (its leader) in a 4GHz shift register and
// re-phases its own divider on that delayed clock; it also returns the delayed clock to the
// leader (loop-back). As a leader, it delays the loop-back clock from the next chiplet by
// the same setting and compares it with its own 250MHz clock. The loop-back has passed the
// link and the delay twice, so a zero error means the follower's divider is in phase with
// the leader's. The phase counter averages the errors and corrects the delay code, which
// the follower applies through code_in (carried over the chiplet control interface).
// The loop runs continuously. Pairwise leader/follower operation, the shift-register
// delays, the 4GHz comparator and the averaging counter follow the document; the code
// transport, code range (one-way delays up to 2ns) and ALIGN_PHASE are this design's.
//
// Timing: all on the 4GHz reference; rx_clk250 and lb_in are expected to come from input
// registers and lb_out to go to an output register (ALIGN_PHASE assumes that).
module mc_dpll #(
  parameter int         AVG_LOG2    = 4,
  parameter logic [3:0] ALIGN_PHASE = 4'd1
)(
  input  logic       clk,
  input  logic       rst_n,
  // follower side (towards the previous chiplet)
  input  logic       follow,
  input  logic       rx_clk250,
  input  logic [2:0] code_in,
  output logic       lb_out,
  // leader side (towards the next chiplet)
  input  logic       lb_in,
  output logic [2:0] code_out,
  output logic       locked,
  output logic       code_update,
  // local clocks
  output logic [3:0] phase,
  output logic       clk250,
  output logic       clk1g,
  output logic       frame_par,
  output logic       jump
);
  logic       ref_aligned;
  logic       lb_delayed;
  logic [3:0] fol_sel;
  logic [3:0] lead_sel;
  logic signed [4:0] err;
  logic       err_valid;
  logic       clk2g_unused, clk500_unused;

  assign fol_sel = 4'd0 - {1'b0, code_in};   // (16 - code) mod 16

  sync_delay_line #(.LEN(16)) u_fol_delay (
    .clk, .rst_n, .din(rx_clk250), .sel(fol_sel), .dout(ref_aligned));

  clock_gen #(.ALIGN_PHASE(ALIGN_PHASE)) u_clkgen (
    .clk, .rst_n, .follow, .ref_aligned, .phase, .clk2g(clk2g_unused), .clk1g,
    .clk500(clk500_unused), .clk250, .frame_par, .jump);

  assign lb_out = ref_aligned;

  sync_delay_line #(.LEN(16)) u_lead_delay (
    .clk, .rst_n, .din(lb_in), .sel(lead_sel), .dout(lb_delayed));

  phase_comparator u_pcmp (
    .clk, .rst_n, .ref_clk250(clk250), .lb_clk250(lb_delayed), .err, .err_valid);

  phase_counter #(.AVG_LOG2(AVG_LOG2)) u_pcnt (
    .clk, .rst_n, .err, .err_valid, .code(code_out), .delay_sel(lead_sel),
    .locked, .update(code_update));
endmodule
