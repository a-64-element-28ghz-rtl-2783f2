// Testbench for cic_decimator (order 2, R = 16): random input, dump every 16 cycles; the
// expected output is the input history weighted by the second-order CIC impulse response
// g(a) = f(a) - 2 f(a-R) + f(a-2R), f(a) = max(a, 0) (a triangle of length 2R).
module tb_cic_decimator;
  localparam int R = 16;
  logic clk = 0, rst_n = 0, dump = 0;
  logic signed [12:0] din;
  logic signed [20:0] dout;
  logic out_valid;
  int checks = 0, failures = 0;
  int hist [$];
  int t = 0, ndump = 0;
  longint e, a;

  cic_decimator #(.IN_W(13), .R(R), .ORDER(2)) dut (.*);

  function automatic longint f(longint a);
    return a > 0 ? a : 0;
  endfunction

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (t = 0; t < 3000; t++) begin
      @(negedge clk);
      din  = (t < 400) ? 13'sd4095 : 13'($urandom_range(8190) - 4095);
      dump = (t % R == 5);
      hist.push_back(int'(din));
      if (dump) begin
        // output at this dump covers inputs presented before this cycle
        e = 0;
        for (int v = 0; v < t; v++) begin
          a = longint'(t - 1 - v);
          e += longint'(hist[v]) * (f(a) - 2 * f(a - R) + f(a - 2 * R));
        end
        @(posedge clk); #1;
        ndump++;
        if (ndump > 1) begin
          checks++;
          if (longint'(dout) != e || !out_valid) begin
            failures++;
            $display("t=%0d dout=%0d exp=%0d valid=%b", t, dout, e, out_valid);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
