// Shared constants, types and helpers of the tileable digital beamforming chiplet.
//
// The whole chiplet is written in the 4GHz reference clock domain: one clock cycle is one
// sample of the sub-ADC bitstreams. Slower rates (2GHz, 1GHz, 500MHz, 250MHz) are phases of
// the divider in clock_gen, used as enables. A frame is one 250MHz period, FRAME_LEN = 16
// cycles; a Streaming-AIB lane bit lasts BIT_LEN = 4 cycles (1Gbps).
//
// Numbers that follow the document: 16 channels, 4 beams, 10-bit phase code, 13 lanes,
// 4:1 time multiplexing, 4GHz/1GHz/250MHz rates. Word widths of the weights and the
// bitstream samples are this design's choice.
package bf_pkg;

  localparam int NUM_CH    = 16;  // antenna channels per chiplet
  localparam int NUM_BEAMS = 4;   // simultaneous beams, one beam-space output each
  localparam int PHASE_W   = 10;  // phase-shift code resolution
  localparam int WEIGHT_W  = 8;   // signed cos/sin weight width (design choice)
  localparam int SAMP_W    = 3;   // signed combined sub-ADC sample, -2..+2
  localparam int LANES     = 13;  // Streaming-AIB data lanes = beam word width
  localparam int SLOTS     = 4;   // beam words time-multiplexed per lane per frame
  localparam int FRAME_LEN = 16;  // 4GHz cycles per 250MHz frame
  localparam int BIT_LEN   = 4;   // 4GHz cycles per 1Gbps lane bit

  typedef logic signed [LANES-1:0]     beam_word_t;
  typedef logic signed [SAMP_W-1:0]    samp_t;
  typedef logic signed [WEIGHT_W-1:0]  weight_t;
  typedef logic        [PHASE_W-1:0]   phase_t;

  // One direction of a Streaming-AIB link: parallel lanes plus the two forwarded clocks.
  typedef struct packed {
    logic [LANES-1:0] data;
    logic             clk1g;   // forwarded 1GHz lane clock, rises mid-bit
    logic             clk250;  // forwarded 250MHz clock, rises with slot 0 of a frame
  } saib_link_t;

  // Saturate a wide signed value to a beam word.
  function automatic beam_word_t sat_word(input logic signed [31:0] v);
    localparam logic signed [31:0] MAXV = (32'sd1 <<< (LANES-1)) - 1;
    localparam logic signed [31:0] MINV = -(32'sd1 <<< (LANES-1));
    if (v > MAXV)      return beam_word_t'(MAXV);
    else if (v < MINV) return beam_word_t'(MINV);
    else               return beam_word_t'(v);
  endfunction

endpackage
