// Testbench for bf_chiplet as the first chiplet of a chain.
//
// Sixteen behavioural bandpass delta-sigma sub-ADC pairs digitize a 1GHz+15.6MHz IF tone
// arriving with a per-element phase slope (a plane wave over the 4x4 sub-array). Four beams
// are steered to different angles. The testbench decodes the chiplet's Streaming-AIB output
// on its own (sampling lanes on the forwarded 1GHz clock, packet start on the 250MHz clock)
// and compares every packet with chiplet_ref_model, at a fixed latency of LAT cycles from
// the decimation instant. Runs dual-sub-ADC mode, then low-power single mode, and checks
// the transmit boost output and the packet rate (one per 16 cycles).
module tb_bf_chiplet;
  import bf_pkg::*;
  localparam int LAT = 31;

  logic clk = 0, rst_n = 0;
  logic dual_mode = 1, tx_boost = 0, iq_phase = 0;
  logic [3:0] fifo_delay = 0;
  phase_t codes [NUM_BEAMS][NUM_CH];
  logic [NUM_CH-1:0] adc_a, adc_b;
  saib_link_t link_in, link_out;
  logic drv_boost, sync_lb_out, frame_par, sync_locked, sync_jump, sync_update, rx_valid;
  logic [2:0] sync_code_out;
  logic [3:0] div_phase;
  real vin [NUM_CH];
  int checks = 0, failures = 0, npk = 0, nmode = 0;
  longint cyc = 0;

  bf_chiplet dut (
    .clk, .rst_n, .first(1'b1), .dual_mode, .tx_boost, .iq_phase, .fifo_delay,
    .phase_code(codes), .adc_a, .adc_b, .link_in, .link_out, .drv_boost,
    .sync_code_in(3'd0), .sync_code_out, .sync_lb_in(1'b0), .sync_lb_out,
    .div_phase, .frame_par, .sync_locked, .sync_jump, .sync_update, .rx_valid);

  for (genvar c = 0; c < NUM_CH; c++) begin : g_adc
    ctbpdsm_model #(.NEGEDGE(0)) u_a (.clk, .vin(vin[c]), .dout(adc_a[c]));
    ctbpdsm_model #(.NEGEDGE(1)) u_b (.clk, .vin(vin[c]), .dout(adc_b[c]));
  end

  int exp_w [NUM_BEAMS], exp_i [NUM_BEAMS], exp_q [NUM_BEAMS];
  logic exp_valid;
  chiplet_ref_model u_ref (.clk, .rst_n, .dual_mode, .iq_phase, .phase(div_phase), .frame_par,
                           .codes, .adc_a, .adc_b, .exp_w, .exp_i, .exp_q, .exp_valid);

  always #5 clk = ~clk;

  // analog IF: element (r,c) of the 4x4 sub-array sees phase pi*sin(30deg)*(r + c)
  localparam real PI = 3.14159265358979;
  real tnow;
  always @(posedge clk or negedge clk) begin
    tnow = real'($time) / 10.0;                    // in 4GHz sample periods
    for (int c = 0; c < NUM_CH; c++)
      vin[c] = 0.5 * $cos(2.0 * PI * (0.25 + 1.0 / 256.0) * (tnow + 0.5)
                          + PI * 0.5 * real'(c / 4 + c % 4));
  end

  // expected words, indexed by the cycle of their decimation
  int     eq_w [$][NUM_BEAMS];
  longint eq_t [$];
  int     ew [NUM_BEAMS];
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (exp_valid) begin
      ew = exp_w;
      eq_w.push_back(ew);
      eq_t.push_back(cyc - 1);
    end
  end

  // independent link decoder
  logic c1_q = 0, c250_q = 0, start = 0;
  int   slot = 0;
  logic [LANES-1:0] pk [SLOTS];
  longint tdump;
  int big = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (link_out.clk250 && !c250_q) start = 1;
      if (link_out.clk1g && !c1_q) begin
        if (start) slot = 0; else slot++;
        start = 0;
        if (slot < SLOTS) pk[slot] = link_out.data;
        if (slot == SLOTS - 1) begin
          npk++;
          while (eq_t.size() > 0 && eq_t[0] < cyc - LAT) begin
            void'(eq_t.pop_front()); void'(eq_w.pop_front());
          end
          if (cyc > 400 && eq_t.size() > 0) begin
            tdump = eq_t[0];
            ew = eq_w[0];
            checks++;
            if (tdump != cyc - LAT) begin
              failures++; $display("packet at %0d: no decimation %0d cycles before", cyc, LAT);
            end else for (int b = 0; b < SLOTS; b++) begin
              checks++;
              if (int'(beam_word_t'(pk[b])) != ew[b]) begin
                failures++;
                $display("cycle %0d beam %0d got %0d exp %0d", cyc, b, beam_word_t'(pk[b]), ew[b]);
              end
              if (ew[b] > 100 || ew[b] < -100) big++;
            end
          end
        end
      end
      c1_q   <= link_out.clk1g;
      c250_q <= link_out.clk250;
    end
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    link_in = '0;
    for (int b = 0; b < NUM_BEAMS; b++)
      for (int c = 0; c < NUM_CH; c++)
        codes[b][c] = phase_t'(-((b * 128) * (c / 4 + c % 4)));   // beam b: 45*b deg/element
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (6000) @(posedge clk);
    @(negedge clk) begin dual_mode = 0; tx_boost = 1; end        // low-power mode, boost on
    nmode++;
    repeat (6000) @(posedge clk);
    @(negedge clk);
    checks++;
    if (drv_boost != 1'b1) begin failures++; $display("boost not driven"); end
    checks++;
    if (npk < 740 || big < 100) begin failures++; $display("packets=%0d large words=%0d", npk, big); end
    $display("packets=%0d large words=%0d mode switches=%0d", npk, big, nmode);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
