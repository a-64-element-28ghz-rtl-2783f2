// End-to-end testbench of the 4-chiplet, 64-element module at its default parameters.
//
// Sequence: the four chiplets leave reset at random, different times, so their clock
// dividers start out of phase. The multi-chip PLLs must bring every divider into phase
// (follower re-phases and delay-code corrections are counted). The one-time calibration
// then sets each chiplet's FIFO delay (2 frames per hop) and I/Q frame parity. A plane wave
// (1GHz + 15.6MHz IF) arrives over the 8x8 array from the direction of beam 1; every
// element has its own pair of behavioural delta-sigma sub-ADCs. The final chiplet's link
// is decoded by the testbench and every packet is compared, at a fixed latency, with the
// saturated sum of the four chiplets' reference-model partial beams. Beam 1 must carry
// clearly more power than the other beams (the 64-element beam pattern). The run switches
// from dual to single sub-ADC mode halfway. Each mechanism must occur at least once:
// follower re-phase, code correction, lock, received packets on chiplets 1-3, FIFO
// alignment, mode switch, transmit boost.
module tb_bf_module_top;
  import bf_pkg::*;
  localparam int NC  = 4;
  localparam int LAT = 31 + (NC - 1) * 2 * FRAME_LEN;
  localparam real PI = 3.14159265358979;

  logic clk = 0;
  logic [NC-1:0] rst_n = '0;
  logic dual_mode = 1;
  logic [NC-1:0] tx_boost = '0, iq_phase = '0;
  logic [NC-1:0][3:0] fifo_delay = '0;
  phase_t codes [NC][NUM_BEAMS][NUM_CH];
  logic [NC-1:0][NUM_CH-1:0] adc_a, adc_b;
  saib_link_t beam_link;
  logic beam_link_boost;
  logic [NC-1:0][3:0] div_phase;
  logic [NC-1:0] frame_par, sync_locked, sync_jump, sync_update, rx_valid;

  bf_module_top dut (.clk, .rst_n, .dual_mode, .tx_boost, .iq_phase, .fifo_delay,
                     .phase_code(codes), .adc_a, .adc_b, .beam_link, .beam_link_boost,
                     .div_phase, .frame_par, .sync_locked, .sync_jump, .sync_update, .rx_valid);

  always #5 clk = ~clk;

  // ---------------- array geometry: chiplet k serves a 4x4 quadrant (spiral order)
  int qr [NC] = '{0, 0, 4, 4};
  int qc [NC] = '{0, 4, 4, 0};
  real ux [NUM_BEAMS] = '{0.0, 0.5, -0.5, 0.25};   // beam steering, sin(angle) along columns
  real uy [NUM_BEAMS] = '{0.0, 0.0, 0.3, -0.25};   // and along rows
  real vin [NC][NUM_CH];

  function automatic real elem_phase(int k, int c, real sx, real sy);
    return PI * (sx * real'(qc[k] + c % 4) + sy * real'(qr[k] + c / 4));
  endfunction

  real tnow;
  always @(posedge clk or negedge clk) begin
    tnow = real'($time) / 10.0;
    for (int k = 0; k < NC; k++)
      for (int c = 0; c < NUM_CH; c++)
        vin[k][c] = 0.5 * $cos(2.0 * PI * (0.25 + 1.0 / 256.0) * (tnow + 0.5)
                               + elem_phase(k, c, ux[1], uy[1]));
  end

  // ---------------- sub-ADCs and reference models per chiplet
  int   exp_w [NC][NUM_BEAMS], exp_i [NC][NUM_BEAMS], exp_q [NC][NUM_BEAMS];
  logic [NC-1:0] exp_valid;
  for (genvar k = 0; k < NC; k++) begin : g_k
    for (genvar c = 0; c < NUM_CH; c++) begin : g_adc
      ctbpdsm_model #(.NEGEDGE(0)) u_a (.clk, .vin(vin[k][c]), .dout(adc_a[k][c]));
      ctbpdsm_model #(.NEGEDGE(1)) u_b (.clk, .vin(vin[k][c]), .dout(adc_b[k][c]));
    end
    chiplet_ref_model u_ref (.clk, .rst_n(rst_n[k]), .dual_mode, .iq_phase(iq_phase[k]),
      .phase(div_phase[k]), .frame_par(frame_par[k]), .codes(codes[k]),
      .adc_a(adc_a[k]), .adc_b(adc_b[k]), .exp_w(exp_w[k]), .exp_i(exp_i[k]),
      .exp_q(exp_q[k]), .exp_valid(exp_valid[k]));
  end

  int checks = 0, failures = 0;
  longint cyc = 0;
  bit  checking = 0;
  int  n_jump = 0, n_upd = 0, n_rx = 0, n_pk = 0, n_mode = 0, n_fifo = 0;
  real pwr [NUM_BEAMS];

  function automatic int sat13(int v);
    return v > 4095 ? 4095 : (v < -4096 ? -4096 : v);
  endfunction

  // ---------------- expected full-array words, indexed by decimation cycle
  int     eq_w [$][NUM_BEAMS];
  longint eq_t [$];
  int     ew [NUM_BEAMS];
  int     acc;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    n_jump += $countones(sync_jump);
    n_upd  += $countones(sync_update);
    n_rx   += $countones(rx_valid[NC-1:1]);
    if (checking && exp_valid != '0) begin
      checks++;
      if (exp_valid != '1) begin failures++; $display("chiplets decimate at different cycles"); end
      for (int b = 0; b < NUM_BEAMS; b++) begin
        acc = exp_w[0][b];
        for (int k = 1; k < NC; k++) acc = sat13(acc + exp_w[k][b]);
        ew[b] = acc;
      end
      eq_w.push_back(ew);
      eq_t.push_back(cyc - 1);
    end
  end

  // ---------------- independent decoder of the module's output link
  logic c1_q = 0, c250_q = 0, start = 0;
  int   slot = 0;
  logic [LANES-1:0] pk [SLOTS];
  int   v;
  always @(posedge clk) begin
    if (beam_link.clk250 && !c250_q) start = 1;
    if (beam_link.clk1g && !c1_q) begin
      if (start) slot = 0; else slot++;
      start = 0;
      if (slot < SLOTS) pk[slot] = beam_link.data;
      if (slot == SLOTS - 1 && checking) begin
        while (eq_t.size() > 0 && eq_t[0] < cyc - LAT) begin
          void'(eq_t.pop_front()); void'(eq_w.pop_front());
        end
        if (eq_t.size() > 0 && eq_t[0] == cyc - LAT) begin
          ew = eq_w[0];
          n_pk++;
          for (int b = 0; b < SLOTS; b++) begin
            v = int'(beam_word_t'(pk[b]));
            checks++;
            if (v != ew[b]) begin
              failures++;
              $display("cycle %0d beam %0d got %0d exp %0d", cyc, b, v, ew[b]);
            end
            pwr[b] += real'(v) * real'(v);
          end
        end
      end
    end
    c1_q   <= beam_link.clk1g;
    c250_q <= beam_link.clk250;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic need(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int t_lock;
  initial begin
    foreach (pwr[b]) pwr[b] = 0.0;
    for (int k = 0; k < NC; k++)
      for (int b = 0; b < NUM_BEAMS; b++)
        for (int c = 0; c < NUM_CH; c++)
          codes[k][b][c] = phase_t'(int'($floor(-elem_phase(k, c, ux[b], uy[b]) / (2.0 * PI)
                                               * 1024.0 + 0.5)));
    tx_boost[NC-1] = 1'b1;
    repeat (3) @(posedge clk);
    for (int k = 0; k < NC; k++) begin
      repeat ($urandom_range(1, 9)) @(negedge clk);
      rst_n[k] = 1'b1;
    end
    // wait for synchronization
    t_lock = -1;
    for (int i = 0; i < 8000 && t_lock < 0; i++) begin
      @(negedge clk);
      if (sync_locked[NC-2:0] == '1 && div_phase[1] == div_phase[0] &&
          div_phase[2] == div_phase[0] && div_phase[3] == div_phase[0]) t_lock = i;
    end
    need(t_lock >= 0, "dividers not aligned");
    $display("all dividers aligned %0d cycles after the last reset", t_lock);
    // one-time calibration of FIFO delay and I/Q frame parity
    for (int k = 0; k < NC; k++) begin
      fifo_delay[k] = 4'(2 * k);
      iq_phase[k]   = frame_par[0] ^ frame_par[k];
      if (k > 0) n_fifo++;
    end
    repeat (200) @(negedge clk);
    checking = 1;
    repeat (5000) @(negedge clk);
    dual_mode = 0;
    n_mode++;
    repeat (5000) @(negedge clk);
    checking = 0;
    for (int k = 0; k < NC; k++) need(div_phase[k] == div_phase[0], "divider phase drifted");
    for (int b = 0; b < NUM_BEAMS; b++) $display("beam %0d mean power %0.1f", b, pwr[b] / real'(n_pk));
    for (int b = 0; b < NUM_BEAMS; b++)
      if (b != 1) need(pwr[1] > 4.0 * pwr[b], "beam 1 not the strongest by 6dB");
    need(n_pk > 550, "too few packets compared");
    need(n_jump > 0, "no follower re-phase");
    need(n_upd > 0, "no delay-code correction");
    need(n_rx > 0, "no packets received by chiplets 1-3");
    need(n_fifo > 0 && n_mode > 0, "FIFO alignment or mode switch not used");
    need(beam_link_boost == 1'b1, "boost not driven");
    $display("packets=%0d re-phases=%0d code-corrections=%0d rx-packets=%0d mode-switches=%0d",
             n_pk, n_jump, n_upd, n_rx, n_mode);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
