// Testbench for phase_weight_lut: all 1024 phase codes against round(127*cos/sin) computed
// with real arithmetic.
module tb_phase_weight_lut;
  import bf_pkg::*;
  phase_t  phase;
  weight_t wc, ws;
  int checks = 0, failures = 0;
  real th;
  int ec, es;

  phase_weight_lut dut (.*);

  initial begin
    for (int p = 0; p < 1024; p++) begin
      phase = PHASE_W'(p);
      #1;
      th = 2.0 * 3.14159265358979 * p / 1024.0;
      ec = int'($floor(127.0 * $cos(th) + 0.5));
      es = int'($floor(127.0 * $sin(th) + 0.5));
      checks += 2;
      if (int'(wc) != ec) begin failures++; $display("cos p=%0d got %0d exp %0d", p, wc, ec); end
      if (int'(ws) != es) begin failures++; $display("sin p=%0d got %0d exp %0d", p, ws, es); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
