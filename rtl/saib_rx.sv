// Streaming-AIB receiver: re-clocks the lanes with the forwarded clock and deserializes 1:4.
//
// The link arrives already captured in the local 4GHz domain. A rising edge of the
// forwarded 1GHz clock samples the 13 lanes (one bit of one beam word per lane). A rising
// edge of the forwarded 250MHz clock marks the next sampled bit as slot 0. After slot 3 the
// four words are handed out together and held until the next packet. Sampling on the
// forwarded clock and packet start on the 250MHz clock follow the document; sampling
// through edge detection in the 4GHz domain (the clocks are phase-aligned by the
// multi-chip PLL) is this design's choice.
//
// Timing: words and valid update one cycle after the 1GHz edge of slot 3; valid pulses.
module saib_rx
  import bf_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  saib_link_t             link,
  output beam_word_t [SLOTS-1:0] words,
  output logic                   valid
);
  logic                   c1_q, c250_q;
  logic                   sof_pending;
  logic [1:0]             slot;
  beam_word_t [SLOTS-2:0] shreg;
  logic                   bit_edge, sof_edge, start;

  assign bit_edge = link.clk1g & ~c1_q;
  assign sof_edge = link.clk250 & ~c250_q;
  assign start    = sof_pending | sof_edge;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c1_q        <= 1'b0;
      c250_q      <= 1'b0;
      sof_pending <= 1'b0;
      slot        <= 2'd3;
      shreg       <= '0;
      words       <= '0;
      valid       <= 1'b0;
    end else begin
      c1_q   <= link.clk1g;
      c250_q <= link.clk250;
      valid  <= 1'b0;
      if (bit_edge) begin
        sof_pending <= 1'b0;
        slot        <= start ? 2'd0 : slot + 2'd1;
        if (start || slot != 2'd2) shreg[start ? 0 : slot + 2'd1] <= link.data;
        else begin
          words <= {link.data, shreg[2], shreg[1], shreg[0]};
          valid <= 1'b1;
        end
      end else if (sof_edge) begin
        sof_pending <= 1'b1;
      end
    end
  end
endmodule
