// Shift-register delay for the 250MHz synchronization clock, clocked at 4GHz.
//
// A LEN-stage shift register samples the 1-bit input every 4GHz cycle; `sel` picks the tap,
// so the output is the input delayed by sel cycles (sel = 0 passes it straight through).
// The follower uses it on the received 250MHz clock and the leader on the looped-back one,
// both with the same setting. The shift-register delay follows the document; its length
// (one 250MHz period) is this design's choice.
module sync_delay_line #(
  parameter int LEN = 16
)(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   din,
  input  logic [$clog2(LEN)-1:0] sel,
  output logic                   dout
);
  logic [LEN-1:1] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sr <= '0;
    else        sr <= {sr[LEN-2:1], din};
  end

  always_comb begin
    if (sel == '0) dout = din;
    else           dout = sr[sel];
  end
endmodule
