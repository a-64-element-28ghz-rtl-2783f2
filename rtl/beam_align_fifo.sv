// Beam alignment FIFO: delays the local partial beams by a programmable number of frames.
//
// Downstream chiplets receive the partial beams of earlier chiplets after processing and
// link latency. To add samples of the same instant, each chiplet writes its own beam words
// into this FIFO once per frame and reads the entry written `delay` frames earlier. The
// delay is set once by calibration and then held. The FIFO and its calibrated delay follow
// the document; the depth, the circular-buffer form and the read rule are this design's.
//
// Interface: wr writes the NW words of din; dout shows the entry written delay+1 writes ago
// (delay = 0 gives the latest write). Reads are combinational from the array.
// Timing: one write per frame; dout is stable from the cycle after a write.
module beam_align_fifo #(
  parameter int W     = 13,
  parameter int NW    = 4,
  parameter int DEPTH = 16
)(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr,
  input  logic [NW-1:0][W-1:0]     din,
  input  logic [$clog2(DEPTH)-1:0] delay,
  output logic [NW-1:0][W-1:0]     dout
);
  localparam int AW = $clog2(DEPTH);

  logic [NW-1:0][W-1:0] mem [DEPTH];
  logic [AW-1:0]        wptr;
  logic [AW-1:0]        rptr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (wr) begin
      mem[wptr] <= din;
      wptr      <= wptr + 1'b1;
    end
  end

  always_comb begin
    rptr = wptr - AW'(1) - delay;
    dout = mem[rptr];
  end
endmodule
