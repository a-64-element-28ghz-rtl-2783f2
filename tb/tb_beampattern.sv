// Beam-pattern test of the 64-element module at its default parameters.
//
// After reset, synchronization and calibration (as in tb_bf_module_top), a plane wave
// sweeps in arrival angle across the 8x8 array along the column axis: sin(angle) from -1
// to +1 in steps of 1/8. Beam 0 points broadside, beam 1 to sin(angle) = 0.5 (30 degrees).
// For each angle the testbench decodes the module's output and measures each beam's power
// over 64 frames. The normalized pattern is compared with the ideal 8x8 array factor
// |sum exp(j*pi*(u - u_beam)*col)|^2: within 1.5dB where the ideal is above -20dB, and
// below -12dB where the ideal has a null (below -25dB). At the beam 1 peak the test also
// measures single-sub-ADC mode. Combining two sub-ADCs half a sample apart at fs/4 should
// raise the signal power by 20*log10(2*cos(pi/8)) = 5.3dB.
module tb_beampattern;
  import bf_pkg::*;
  localparam int  NC  = 4;
  localparam real PI  = 3.14159265358979;
  localparam int  NPT = 17;

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

  int  qr [NC] = '{0, 0, 4, 4};
  int  qc [NC] = '{0, 4, 4, 0};
  real ux [NUM_BEAMS] = '{0.0, 0.5, -0.5, 0.25};
  real us = 0.0;                                     // arrival direction, sin(angle)
  real vin [NC][NUM_CH];

  function automatic real elem_phase(int k, int c, real sx);
    return PI * sx * real'(qc[k] + c % 4);
  endfunction

  real tnow;
  always @(posedge clk or negedge clk) begin
    tnow = real'($time) / 10.0;
    for (int k = 0; k < NC; k++)
      for (int c = 0; c < NUM_CH; c++)
        vin[k][c] = 0.5 * $cos(2.0 * PI * (0.25 + 1.0 / 256.0) * (tnow + 0.5)
                               + elem_phase(k, c, us));
  end

  for (genvar k = 0; k < NC; k++) begin : g_k
    for (genvar c = 0; c < NUM_CH; c++) begin : g_adc
      ctbpdsm_model #(.NEGEDGE(0)) u_a (.clk, .vin(vin[k][c]), .dout(adc_a[k][c]));
      ctbpdsm_model #(.NEGEDGE(1)) u_b (.clk, .vin(vin[k][c]), .dout(adc_b[k][c]));
    end
  end

  // output decoder accumulating beam power
  logic c1_q = 0, c250_q = 0, start = 0;
  int   slot = 0, nfr = 0;
  bit   meas = 0;
  real  acc [NUM_BEAMS];
  real  v;
  always @(posedge clk) begin
    if (beam_link.clk250 && !c250_q) start = 1;
    if (beam_link.clk1g && !c1_q) begin
      if (start) slot = 0; else slot++;
      start = 0;
      if (meas && slot < SLOTS) begin
        v = real'(beam_word_t'(beam_link.data));
        acc[slot] += v * v;
        if (slot == SLOTS - 1) nfr++;
      end
    end
    c1_q   <= beam_link.clk1g;
    c250_q <= beam_link.clk250;
  end

  int checks = 0, failures = 0;
  real pw [NPT][2];
  real peak [2];
  real ideal, meas_db, ideal_db, p_single, gain_db;

  task automatic measure(output real p [NUM_BEAMS]);
    repeat (300) @(negedge clk);                    // flush filter and chain latency
    foreach (acc[b]) acc[b] = 0.0;
    nfr = 0;
    meas = 1;
    wait (nfr == 64);
    meas = 0;
    foreach (acc[b]) p[b] = acc[b] / 64.0;
  endtask

  function automatic real array_factor(real du);
    real re = 0.0, im = 0.0;
    for (int col = 0; col < 8; col++) begin
      re += $cos(PI * du * real'(col));
      im += $sin(PI * du * real'(col));
    end
    return (re * re + im * im) / 64.0;
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real p [NUM_BEAMS];
  initial begin
    for (int k = 0; k < NC; k++)
      for (int b = 0; b < NUM_BEAMS; b++)
        for (int c = 0; c < NUM_CH; c++)
          codes[k][b][c] = phase_t'(int'($floor(-elem_phase(k, c, ux[b]) / (2.0 * PI)
                                               * 1024.0 + 0.5)));
    repeat (3) @(posedge clk);
    for (int k = 0; k < NC; k++) begin
      repeat ($urandom_range(1, 9)) @(negedge clk);
      rst_n[k] = 1'b1;
    end
    wait (sync_locked[NC-2:0] == '1 && div_phase[1] == div_phase[0] &&
          div_phase[2] == div_phase[0] && div_phase[3] == div_phase[0]);
    @(negedge clk);
    for (int k = 0; k < NC; k++) begin
      fifo_delay[k] = 4'(2 * k);
      iq_phase[k]   = frame_par[0] ^ frame_par[k];
    end
    peak = '{0.0, 0.0};
    for (int i = 0; i < NPT; i++) begin
      us = -1.0 + real'(i) / 8.0;
      measure(p);
      pw[i][0] = p[0];
      pw[i][1] = p[1];
      if (p[0] > peak[0]) peak[0] = p[0];
      if (p[1] > peak[1]) peak[1] = p[1];
    end
    for (int b = 0; b < 2; b++) begin
      for (int i = 0; i < NPT; i++) begin
        us = -1.0 + real'(i) / 8.0;
        ideal    = array_factor(us - ux[b]);
        ideal_db = 10.0 * $log10(ideal + 1e-9);
        meas_db  = 10.0 * $log10(pw[i][b] / peak[b] + 1e-9);
        $display("beam %0d  sin(angle) %6.3f  measured %7.2f dB  ideal %7.2f dB", b, us, meas_db, ideal_db);
        if (ideal_db > -20.0) begin
          checks++;
          if (meas_db - ideal_db > 1.5 || ideal_db - meas_db > 1.5) begin
            failures++; $display("  pattern off by more than 1.5dB");
          end
        end else if (ideal_db < -25.0) begin
          checks++;
          if (meas_db > -12.0) begin failures++; $display("  null not deep enough"); end
        end
      end
    end
    // sub-ADC combining gain at the beam 1 peak
    us = 0.5;
    measure(p);
    gain_db = p[1];
    dual_mode = 0;
    measure(p);
    p_single = p[1];
    gain_db = 10.0 * $log10(gain_db / p_single);
    $display("dual/single sub-ADC power ratio %0.2f dB (two-tap FIR at fs/4: 5.33 dB)", gain_db);
    checks++;
    if (gain_db < 4.5 || gain_db > 6.2) begin failures++; $display("  combining gain wrong"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
