// Chiplet clock generator: divides the 4GHz reference into 2GHz, 1GHz, 500MHz and 250MHz.
//
// A 4-bit counter runs on the 4GHz reference; its bits are the divided clocks, each high in
// the first half of its period (clk250 is high while phase = 0..7). The phase value itself
// is what the rest of the chiplet uses as enables. After a reset the divider of each chip
// starts in an arbitrary state. A follower chiplet (follow = 1) therefore re-phases its
// divider on every rising edge of the aligned 250MHz reference from the multi-chip PLL:
// the counter is loaded with ALIGN_PHASE, the phase the leader has at that moment. Doing
// this on every edge keeps tracking after a glitch of the source clock. A leader
// (follow = 0) runs free. frame_par toggles once per frame and is not aligned.
// Division ratios follow the document; ALIGN_PHASE compensates this design's fixed
// register latencies in the synchronization loop.
//
// Timing: outputs are registers on the 4GHz clock; a re-phase takes effect in the cycle
// after the reference edge, and `jump` pulses in that cycle if the phase changed.
module clock_gen #(
  parameter logic [3:0] ALIGN_PHASE = 4'd1
)(
  input  logic       clk,        // 4GHz reference
  input  logic       rst_n,
  input  logic       follow,
  input  logic       ref_aligned, // delayed 250MHz reference (follower only)
  output logic [3:0] phase,
  output logic       clk2g,
  output logic       clk1g,
  output logic       clk500,
  output logic       clk250,
  output logic       frame_par,
  output logic       jump
);
  logic ref_q;
  logic ref_edge;

  assign ref_edge = ref_aligned & ~ref_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= '0;
      ref_q     <= 1'b0;
      frame_par <= 1'b0;
      jump      <= 1'b0;
    end else begin
      ref_q <= ref_aligned;
      jump  <= 1'b0;
      if (follow && ref_edge) begin
        phase <= ALIGN_PHASE;
        jump  <= (phase + 4'd1) != ALIGN_PHASE;
      end else begin
        phase <= phase + 4'd1;
      end
      if (phase == 4'd15) frame_par <= ~frame_par;
    end
  end

  assign clk2g  = ~phase[0];
  assign clk1g  = ~phase[1];
  assign clk500 = ~phase[2];
  assign clk250 = ~phase[3];
endmodule
