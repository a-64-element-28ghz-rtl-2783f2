// Testbench for clock_gen: a leader divider must count 0..15 and give divided clocks of
// period 2/4/8/16 cycles; a follower must take ALIGN_PHASE the cycle after each rising edge
// of its reference, including after the reference jumps (a glitch), and flag the jump.
module tb_clock_gen;
  logic clk = 0, rst_n = 0, follow = 0, ref_aligned = 0;
  logic [3:0] phase;
  logic clk2g, clk1g, clk500, clk250, frame_par, jump;
  int checks = 0, failures = 0, njump = 0;
  logic [3:0] exp_ph;
  logic ref_prev;

  clock_gen #(.ALIGN_PHASE(4'd1)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("%0t: %s phase=%0d exp=%0d", $time, what, phase, exp_ph); end
  endtask

  int off;
  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    exp_ph = phase;                        // leader: free running from reset
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      exp_ph = exp_ph + 1;
      chk(phase == exp_ph, "leader count");
      chk(clk2g == ~phase[0] && clk1g == ~phase[1] && clk500 == ~phase[2] && clk250 == ~phase[3],
          "divided clocks");
    end
    // follower with a 250MHz reference whose phase jumps every 40 frames
    follow = 1;
    off = 5;
    ref_prev = 0;
    for (int i = 0; i < 4000; i++) begin
      if (i % 640 == 0) off = $urandom_range(15);
      ref_aligned = ((i + off) % 16) < 8;
      @(negedge clk);
      if (ref_aligned && !ref_prev) exp_ph = 4'd1; else exp_ph = exp_ph + 1;
      ref_prev = ref_aligned;
      if (i > 40) chk(phase == exp_ph, "follower phase");
      if (jump) njump++;
    end
    chk(njump >= 3, "re-phase events");
    $display("jumps=%0d", njump);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
