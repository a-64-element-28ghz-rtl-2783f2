// Phase comparator of the multi-chip PLL, clocked at 4GHz.
//
// Detects rising edges of the leader's own 250MHz clock (ref) and of the looped-back
// 250MHz clock (lb). At each loop-back edge it reports how many 4GHz cycles that edge comes
// after the latest reference edge, wrapped into -8..+7: the sign is the lead/lag direction,
// the value the magnitude. The document gives the comparator's job and its 4GHz clock; the
// cycle-counting method is this design's choice.
//
// Timing: err and err_valid are registered; err_valid pulses once per loop-back edge,
// in the cycle after that edge is seen.
module phase_comparator (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ref_clk250,
  input  logic              lb_clk250,
  output logic signed [4:0] err,
  output logic              err_valid
);
  logic       ref_q, lb_q;
  logic       ref_edge, lb_edge;
  logic [3:0] since_ref;
  logic [3:0] lag;

  assign ref_edge = ref_clk250 & ~ref_q;
  assign lb_edge  = lb_clk250 & ~lb_q;
  assign lag      = ref_edge ? 4'd0 : since_ref + 4'd1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ref_q     <= 1'b0;
      lb_q      <= 1'b0;
      since_ref <= '0;
      err       <= '0;
      err_valid <= 1'b0;
    end else begin
      ref_q     <= ref_clk250;
      lb_q      <= lb_clk250;
      since_ref <= lag;
      err_valid <= lb_edge;
      if (lb_edge) err <= (lag >= 4'd8) ? $signed({1'b0, lag}) - 5'sd16
                                        : $signed({1'b0, lag});
    end
  end
endmodule
