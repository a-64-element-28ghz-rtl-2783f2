// Partial-beam summer: adds the aligned local beam words to the received beam words.
//
// Beamforming is linear, so the full-array beam is the sum of the chiplets' partial beams.
// Each chiplet adds its delayed local words to the words received from the previous
// chiplet and forwards the result. The first chiplet of the chain has nothing to add
// (first = 1 ignores the receiver). Results saturate to the word width rather than wrap;
// saturation is this design's choice.
//
// Timing: registered, the sum is taken when `load` is high and held until the next load.
module beam_summer
  import bf_pkg::*;
#(
  parameter int NW = NUM_BEAMS
)(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  load,
  input  logic                  first,
  input  beam_word_t [NW-1:0]   local_w,
  input  beam_word_t [NW-1:0]   rx_w,
  output beam_word_t [NW-1:0]   sum_w
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sum_w <= '0;
    else if (load) begin
      for (int b = 0; b < NW; b++)
        sum_w[b] <= first ? local_w[b]
                          : sat_word(32'(local_w[b]) + 32'(rx_w[b]));
    end
  end
endmodule
