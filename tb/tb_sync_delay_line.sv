// Testbench for sync_delay_line: a random bit stream through every tap setting; the output
// must equal the input delayed by exactly sel cycles.
module tb_sync_delay_line;
  logic clk = 0, rst_n = 0, din = 0, dout;
  logic [3:0] sel = 0;
  int checks = 0, failures = 0;
  logic hist [$];
  int idx;

  sync_delay_line #(.LEN(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      if (i % 100 == 0) sel = $urandom_range(15);
      din = 1'($urandom);
      hist.push_back(din);
      #1;
      if (i % 100 >= 20) begin
        checks++;
        idx = hist.size() - 1 - int'(sel);
        if (dout != hist[idx]) begin
          failures++; $display("i=%0d sel=%0d", i, sel);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
