// Phase counter of the multi-chip PLL: averages phase errors and corrects the delay code.
//
// The looped-back clock passes the link and the shift-register delay twice, so a code
// error of k cycles shows as a round-trip error of 2k. Each measured error is halved and
// taken modulo 8 as a signed value -4..+3. 2^AVG_LOG2 of these are summed, the rounded
// mean is added to the 3-bit delay code (modulo 8), and a new window starts. The code is
// the one-way channel delay estimate; the shift-register delays use (16 - code) mod 16, so
// one-way delays of 0..7 cycles (up to 2ns) can be compensated. `locked` is high after a
// window whose mean correction was zero. The document gives averaging and correction; the
// window length, rounding and modulo arithmetic are this design's choice. Errors are
// always even once the loop is closed, so bit 0 of err is not used; bit 4 drops out in the
// modulo-8 halving.
//
// Timing: code changes in the cycle after the last error of a window; `update` pulses then
// if the code changed.
module phase_counter #(
  parameter int AVG_LOG2 = 4
)(
  input  logic              clk,
  input  logic              rst_n,
  input  logic signed [4:0] err,
  input  logic              err_valid,
  output logic [2:0]        code,
  output logic [3:0]        delay_sel,
  output logic              locked,
  output logic              update
);
  localparam int ACC_W = 3 + AVG_LOG2 + 1;

  logic signed [2:0]       half_err;
  logic signed [ACC_W-1:0] acc, acc_next;
  logic [AVG_LOG2-1:0]     cnt;
  logic signed [ACC_W-1:0] mean;

  always_comb begin
    half_err = err[3:1];                                   // err/2 modulo 8, signed
    acc_next = acc + ACC_W'(half_err);
    mean     = (acc_next + ACC_W'(1 << (AVG_LOG2-1))) >>> AVG_LOG2;
    delay_sel = 4'd0 - {1'b0, code};                       // (16 - code) mod 16
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc    <= '0;
      cnt    <= '0;
      code   <= '0;
      locked <= 1'b0;
      update <= 1'b0;
    end else begin
      update <= 1'b0;
      if (err_valid) begin
        cnt <= cnt + 1'b1;
        if (cnt == '1) begin
          acc    <= '0;
          code   <= code + mean[2:0];
          locked <= (mean == '0);
          update <= (mean[2:0] != 3'd0);
        end else begin
          acc <= acc_next;
        end
      end
    end
  end
endmodule
