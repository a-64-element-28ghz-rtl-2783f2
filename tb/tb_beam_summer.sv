// Testbench for beam_summer: random and extreme word pairs; the held result must be the
// saturated sum (or the local words alone for the first chiplet) after each load.
module tb_beam_summer;
  import bf_pkg::*;
  logic clk = 0, rst_n = 0, load = 0, first = 0;
  beam_word_t [3:0] local_w, rx_w, sum_w;
  int checks = 0, failures = 0, nsat = 0;
  int e;

  beam_summer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    local_w = '0; rx_w = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      first = (i % 5 == 0);
      for (int b = 0; b < 4; b++) begin
        local_w[b] = (i % 3 == 0) ? beam_word_t'($urandom) : beam_word_t'($urandom_range(2000) - 1000);
        rx_w[b]    = (i % 3 == 0) ? beam_word_t'($urandom) : beam_word_t'($urandom_range(2000) - 1000);
      end
      load = 1;
      @(negedge clk);
      load = 0;
      local_w = '0; rx_w = '0;                 // must not change the held result
      @(negedge clk);
    end
  end

  // reference check on every load
  beam_word_t [3:0] l_s, r_s;
  logic f_s;
  always @(posedge clk) if (rst_n && load) begin
    l_s <= local_w; r_s <= rx_w; f_s <= first;
    #2;
    for (int b = 0; b < 4; b++) begin
      e = f_s ? int'(l_s[b]) : int'(l_s[b]) + int'(r_s[b]);
      if (e > 4095) begin e = 4095; nsat++; end
      if (e < -4096) begin e = -4096; nsat++; end
      checks++;
      if (int'(sum_w[b]) != e) begin
        failures++;
        $display("beam %0d got %0d exp %0d", b, sum_w[b], e);
      end
    end
    if (checks >= 2400) begin
      if (nsat == 0) failures++;
      $display("saturations=%0d", nsat);
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
