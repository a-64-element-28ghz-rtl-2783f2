// Testbench for adc_combiner: random sub-ADC bits in both modes; checks the combined
// sample (+-1 per bit, summed in dual mode) and its one-cycle latency.
module tb_adc_combiner;
  import bf_pkg::*;
  logic clk = 0, rst_n = 0, dual_mode = 0, adc_a = 0, adc_b = 0;
  samp_t y;
  int checks = 0, failures = 0;
  int exp_q;

  adc_combiner dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      dual_mode = (i >= 200);
      adc_a = 1'($urandom);
      adc_b = 1'($urandom);
      exp_q = (adc_a ? 1 : -1) + (dual_mode ? (adc_b ? 1 : -1) : 0);
      @(posedge clk); #1;
      checks++;
      if (int'(y) != exp_q) begin
        failures++;
        $display("mismatch i=%0d a=%b b=%b dual=%b y=%0d exp=%0d", i, adc_a, adc_b, dual_mode, y, exp_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
