// Streaming-AIB transmitter: 13 lanes, each a 4:1 serializer, plus forwarded clocks.
//
// Once per 250MHz frame (phase 15) the four beam words are latched. During the frame,
// lane i sends bit i of word 0, 1, 2, 3 in turn, each for one 1Gbps bit time (4 cycles of
// the 4GHz reference): four 250Mbps beam-space outputs time-multiplexed onto each lane.
// The forwarded 250MHz clock rises with slot 0 and marks the start of the packet; the
// forwarded 1GHz clock rises in the middle of each bit so the receiver can sample there.
// boost asks the pad drivers for the stronger mode used to reach the off-module FPGA.
// Lane count, 4:1 multiplexing, rates and the two forwarded clocks follow the document;
// the bit order, slot order and the clock edges' position are this design's choice.
//
// Timing: all outputs are registered, so the link runs one cycle behind the divider phase:
// slot s is on the lanes while the local phase is 4s+1 .. 4s+4 (mod 16). A word set
// presented at phase 15 is latched and sent during the following frame.
module saib_tx
  import bf_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [3:0]            phase,
  input  beam_word_t [SLOTS-1:0] words,
  input  logic                  boost,
  output saib_link_t            link,
  output logic                  drv_boost
);
  beam_word_t [SLOTS-1:0] hold;
  logic [1:0]             slot;

  assign slot = phase[3:2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold      <= '0;
      link      <= '0;
      drv_boost <= 1'b0;
    end else begin
      if (phase == 4'd15) hold <= words;
      link.data   <= hold[slot];
      link.clk1g  <= phase[1];
      link.clk250 <= ~phase[3];
      drv_boost   <= boost;
    end
  end
endmodule
