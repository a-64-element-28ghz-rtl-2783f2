// Testbench for bitstream_beamformer: random samples, weights and sample phases; the
// expected beam is the complex product (y * j^-n) * (wc + j*ws) summed over the 16 channels,
// checked one cycle later.
module tb_bitstream_beamformer;
  import bf_pkg::*;
  localparam int NCH = 16;
  logic clk = 0, rst_n = 0;
  logic [1:0] nphase;
  samp_t   y  [NCH];
  weight_t wc [NCH];
  weight_t ws [NCH];
  logic signed [12:0] beam_i, beam_q;
  int checks = 0, failures = 0;
  int ei, eq, zi, zq;
  int ci [4] = '{1, 0, -1, 0};
  int si [4] = '{0, 1, 0, -1};

  bitstream_beamformer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    nphase = 0;
    foreach (y[c]) begin y[c] = 0; wc[c] = 0; ws[c] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      nphase = 2'($urandom);
      ei = 0; eq = 0;
      foreach (y[c]) begin
        y[c]  = samp_t'(int'($urandom_range(4)) - 2);
        wc[c] = (i < 10) ? 8'sd127 : weight_t'($urandom_range(254) - 127);
        ws[c] = (i < 10) ? -8'sd127 : weight_t'($urandom_range(254) - 127);
        zi = int'(y[c]) * ci[nphase];       // y * exp(-j*pi*n/2)
        zq = -int'(y[c]) * si[nphase];
        ei += zi * int'(wc[c]) - zq * int'(ws[c]);
        eq += zi * int'(ws[c]) + zq * int'(wc[c]);
      end
      @(posedge clk); #1;
      checks += 2;
      if (int'(beam_i) != ei || int'(beam_q) != eq) begin
        failures++;
        $display("mismatch i=%0d n=%0d got (%0d,%0d) exp (%0d,%0d)", i, nphase, beam_i, beam_q, ei, eq);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
