// Testbench for saib_tx: a new random word set per frame; each cycle the lanes must carry
// bit i of the slot word on lane i, with the forwarded 250MHz clock high in slots 0-1 and
// the forwarded 1GHz clock rising in the middle of every 4-cycle bit. Also checks that a
// 250MHz rising edge comes every 16 cycles and a 1GHz rising edge every 4 (the lane rate).
module tb_saib_tx;
  import bf_pkg::*;
  logic clk = 0, rst_n = 0, boost = 0;
  logic [3:0] phase = 0;
  beam_word_t [SLOTS-1:0] words, cur;
  saib_link_t link;
  logic drv_boost;
  int checks = 0, failures = 0;
  logic [31:0] rnd;
  int last250 = -1, last1g = -1, cyc = 0;
  logic c250_q = 0, c1_q = 0;

  saib_tx dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("cycle %0d phase %0d: %s", cyc, phase, what); end
  endtask

  initial begin
    words = '0; cur = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (cyc = 0; cyc < 3200; cyc++) begin
      if (phase == 4'd0) for (int b = 0; b < SLOTS; b++) begin rnd = $urandom; words[b] = rnd[LANES-1:0]; end
      boost = cyc[9];
      @(negedge clk);
      // link now shows what was sent for `phase`
      chk(link.data == cur[phase[3:2]], "lane data");
      chk(link.clk250 == ~phase[3], "forwarded 250MHz clock");
      chk(link.clk1g == phase[1], "forwarded 1GHz clock");
      chk(drv_boost == boost, "boost");
      if (link.clk250 && !c250_q) begin
        if (last250 >= 0) chk(cyc - last250 == FRAME_LEN, "250MHz period");
        last250 = cyc;
      end
      if (link.clk1g && !c1_q) begin
        if (last1g >= 0) chk(cyc - last1g == BIT_LEN, "1GHz period");
        last1g = cyc;
      end
      c250_q = link.clk250; c1_q = link.clk1g;
      if (phase == 4'd15) cur = words;
      phase = phase + 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
