// Testbench for saib_rx: the testbench builds the lane waveforms itself (slot words for
// 4 cycles each, forwarded 1GHz clock rising mid-bit, forwarded 250MHz clock marking slot 0)
// with a random start offset, and checks every deserialized packet and the packet rate
// (one per 16 cycles).
module tb_saib_rx;
  import bf_pkg::*;
  logic clk = 0, rst_n = 0;
  saib_link_t link;
  beam_word_t [SLOTS-1:0] words;
  logic valid;
  int checks = 0, failures = 0;
  logic [31:0] rnd;
  beam_word_t [SLOTS-1:0] sent [$];
  beam_word_t [SLOTS-1:0] pkt, expw;
  int nrx = 0, lastv = -1, cyc = 0;

  saib_rx dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    link = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    repeat ($urandom_range(20)) @(negedge clk);
    for (int f = 0; f < 500; f++) begin
      for (int b = 0; b < SLOTS; b++) begin rnd = $urandom; pkt[b] = rnd[LANES-1:0]; end
      sent.push_back(pkt);
      for (int p = 0; p < FRAME_LEN; p++) begin
        link.data   = pkt[p / BIT_LEN];
        link.clk250 = (p < FRAME_LEN / 2);
        link.clk1g  = ((p % BIT_LEN) >= BIT_LEN / 2);
        @(negedge clk);
      end
    end
    repeat (20) @(negedge clk);
    checks++;
    if (nrx < 499) begin failures++; $display("only %0d packets", nrx); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc = cyc + 1;
    if (rst_n && valid) begin
      expw = sent[nrx];
      checks++;
      if (words != expw) begin failures++; $display("packet %0d got %h exp %h", nrx, words, expw); end
      if (lastv >= 0) begin
        checks++;
        if (cyc - lastv != FRAME_LEN) begin failures++; $display("packet spacing %0d", cyc - lastv); end
      end
      lastv = cyc;
      nrx = nrx + 1;
    end
  end
endmodule
