// Testbench for mc_dpll: a leader and a follower chiplet PLL joined by a two-way channel.
// Each direction of the channel is an output register, d_ch cycles of wire delay and an
// input register, as between two chiplets. The two are released from reset at different
// random times so their dividers start out of phase. The check: within a bounded time the
// delay code equals the one-way delay (2 + d_ch), the follower's divider phase equals the
// leader's every cycle and lock is reported. The channel delay is then changed (a glitch)
// and the loop must re-lock. Counts code corrections and follower re-phase events.
module tb_mc_dpll;
  logic clk = 0;
  logic rst_a = 0, rst_b = 0;
  // leader A
  logic [2:0] code_a;
  logic lb_out_a, locked_a, upd_a, clk250_a, clk1g_a, par_a, jump_a;
  logic [3:0] phase_a;
  // follower B
  logic [2:0] code_b_unused;
  logic lb_out_b, locked_b, upd_b, clk250_b, clk1g_b, par_b, jump_b;
  logic [3:0] phase_b;
  // channel
  logic fwd_o, fwd_i, lb_o, lb_i;
  logic [15:0] fwd_sr = 0, lb_sr = 0;
  int d_ch = 0;
  int checks = 0, failures = 0, nupd = 0, njump = 0, t_lock;

  mc_dpll u_a (.clk, .rst_n(rst_a), .follow(1'b0), .rx_clk250(1'b0), .code_in(3'd0),
               .lb_out(lb_out_a), .lb_in(lb_i), .code_out(code_a), .locked(locked_a),
               .code_update(upd_a), .phase(phase_a), .clk250(clk250_a), .clk1g(clk1g_a),
               .frame_par(par_a), .jump(jump_a));
  mc_dpll u_b (.clk, .rst_n(rst_b), .follow(1'b1), .rx_clk250(fwd_i), .code_in(code_a),
               .lb_out(lb_out_b), .lb_in(1'b0), .code_out(code_b_unused), .locked(locked_b),
               .code_update(upd_b), .phase(phase_b), .clk250(clk250_b), .clk1g(clk1g_b),
               .frame_par(par_b), .jump(jump_b));

  always #5 clk = ~clk;

  // output register -> d_ch wire cycles -> input register, both directions
  always @(posedge clk) begin
    fwd_o  <= clk250_a;
    lb_o   <= lb_out_b;
    fwd_sr <= {fwd_sr[14:0], fwd_o};
    lb_sr  <= {lb_sr[14:0], lb_o};
    fwd_i  <= (d_ch == 0) ? fwd_o : fwd_sr[d_ch-1];
    lb_i   <= (d_ch == 0) ? lb_o : lb_sr[d_ch-1];
    if (upd_a) nupd++;
    if (jump_b) njump++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_lock(input int dch);
    d_ch = dch;
    t_lock = -1;
    for (int i = 0; i < 6000; i++) begin
      @(negedge clk);
      if (t_lock < 0 && locked_a && code_a == 3'(2 + dch) && phase_a == phase_b) t_lock = i;
    end
    checks++;
    if (t_lock < 0) begin
      failures++;
      $display("d_ch=%0d: no lock, code=%0d phases %0d/%0d", dch, code_a, phase_a, phase_b);
    end else $display("d_ch=%0d: locked after %0d cycles, code=%0d", dch, t_lock, code_a);
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      checks++;
      if (phase_a != phase_b) begin failures++; $display("phase mismatch %0d/%0d", phase_a, phase_b); break; end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_a = 1;
    repeat ($urandom_range(3, 13)) @(negedge clk);
    rst_b = 1;
    run_lock(3);
    run_lock(0);           // channel delay changes: loop must follow
    run_lock(5);
    run_lock(1);
    checks++;
    if (nupd == 0 || njump == 0) failures++;
    $display("code updates=%0d follower re-phases=%0d", nupd, njump);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
