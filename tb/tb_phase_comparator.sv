// Testbench for phase_comparator: two 250MHz square waves (16-cycle period) with a known
// offset k cycles (loop-back later than reference by k); the reported error must be k
// wrapped into -8..+7, once per loop-back edge.
module tb_phase_comparator;
  logic clk = 0, rst_n = 0, ref_clk250 = 0, lb_clk250 = 0;
  logic signed [4:0] err;
  logic err_valid;
  int checks = 0, failures = 0, nvalid = 0, k = 0, e;

  phase_comparator dut (.*);

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
    for (int i = 0; i < 8000; i++) begin
      if (i % 160 == 0) k = $urandom_range(15);
      ref_clk250 = (i % 16) < 8;
      lb_clk250  = ((i - k + 1600) % 16) < 8;
      @(negedge clk);
      if (err_valid && (i % 160) > 40) begin
        e = (k >= 8) ? k - 16 : k;
        checks++;
        if (int'(err) != e) begin failures++; $display("k=%0d err=%0d exp=%0d", k, err, e); end
      end
      if (err_valid) nvalid++;
    end
    checks++;
    if (nvalid < 490) begin failures++; $display("only %0d measurements", nvalid); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
