// Testbench for phase_counter (AVG_LOG2 = 4): windows of 16 round-trip errors built from a
// hidden one-way delay d and the current code (err = 2(d - code) wrapped to -8..+7, with
// occasional +-2 noise). The code must be corrected by the rounded mean after each window,
// converge to d, and report lock.
module tb_phase_counter;
  logic clk = 0, rst_n = 0, err_valid = 0;
  logic signed [4:0] err = 0;
  logic [2:0] code;
  logic [3:0] delay_sel;
  logic locked, update;
  int checks = 0, failures = 0, nupd = 0;
  int d, sum, m, e, expc;

  phase_counter #(.AVG_LOG2(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int wrap16(int v);
    v = ((v % 16) + 16) % 16;
    return v >= 8 ? v - 16 : v;
  endfunction
  function automatic int sx3(int v);
    v = ((v % 8) + 8) % 8;
    return v >= 4 ? v - 8 : v;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 30; trial++) begin
      d = $urandom_range(7);
      for (int w = 0; w < 6; w++) begin
        sum = 0;
        expc = int'(code);
        for (int s = 0; s < 16; s++) begin
          e = wrap16(2 * (d - int'(code)) + ((s == 3 && trial % 2 == 1) ? 2 : 0));
          sum += sx3(e / 2 - ((e < 0 && e % 2 != 0) ? 1 : 0));
          err = 5'(e);
          err_valid = 1;
          @(negedge clk);
          err_valid = 0;
          repeat (15) @(negedge clk);
        end
        m = (sum + 8) >>> 4;
        expc = (expc + m) & 7;
        checks++;
        if (int'(code) != expc) begin failures++; $display("trial %0d win %0d code=%0d exp=%0d", trial, w, code, expc); end
        checks++;
        if (locked != (m == 0)) begin failures++; $display("lock flag wrong"); end
        checks++;
        if (delay_sel != 4'(16 - int'(code))) begin failures++; $display("delay_sel wrong"); end
      end
      checks++;
      if (int'(code) != d) begin failures++; $display("trial %0d: code %0d did not reach d=%0d", trial, code, d); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always @(posedge clk) if (rst_n && update) nupd++;
  final $display("code updates=%0d", nupd);
endmodule
