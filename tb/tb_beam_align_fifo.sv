// Testbench for beam_align_fifo: one random word set written per 16-cycle frame; for a
// changing delay setting the output must be the set written delay+1 writes earlier.
module tb_beam_align_fifo;
  localparam int W = 13, NW = 4, DEPTH = 16;
  logic clk = 0, rst_n = 0, wr = 0;
  logic [NW-1:0][W-1:0] din, dout;
  logic [3:0] delay;
  int checks = 0, failures = 0;
  logic [31:0] rnd;
  int idx;
  logic [NW-1:0][W-1:0] expw;
  logic [NW-1:0][W-1:0] written [$];

  beam_align_fifo #(.W(W), .NW(NW), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = '0; delay = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 300; f++) begin
      @(negedge clk);
      wr = 1;
      for (int b = 0; b < NW; b++) begin rnd = $urandom; din[b] = rnd[W-1:0]; end
      written.push_back(din);
      @(negedge clk);
      wr = 0;
      delay = (f < 100) ? 4'd0 : 4'($urandom);
      repeat (3) @(negedge clk);
      idx = written.size() - 1 - int'(delay);
      if (idx >= 0) begin
        expw = written[idx];
        checks++;
        if (dout != expw) begin
          failures++;
          $display("frame %0d delay %0d: got %h exp %h", f, delay, dout, expw);
        end
      end
      repeat (11) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
