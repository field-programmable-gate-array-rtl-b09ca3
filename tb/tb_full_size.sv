// Full-size test of the top level at its default parameters: 102 subcodes,
// 4096 code periods per map, 4 maps integrated, 512 range bins, 4096-word
// DRFM memory.
//
// Radar side: a P4-coded echo with a range delay of 40 subcodes and a Doppler
// shift of 5 bins (plus noise) is received for 4 maps (1,671,168 samples);
// the one integrated map must have all 417,792 points and its largest point
// at the expected range and Doppler bin. DRFM side: a 40-sample pulse at exact
// 5-bit phase angles is stored, recalled after a delay and synthesized by all
// 512 range bins; every DAC sample is compared with the sum of the bins' parts
// computed from the equations, for three pulses with per-pulse phase and gain
// steps. Each mechanism (bank swap, FFT drain, integration, recall, pulse
// step, gain clamp) is counted and must happen.
`include "tb_common.svh"
module tb_full_size;
  import radar_pkg::*;
  `TB_COUNTERS
  localparam int NC = 102, NPER = 4096, NMAPS = 4, NTOT = 4, NB = 512, MD = 4096;
  localparam int DEPTH = NC * NPER, DELAY = 40, FD = 5;
  localparam int PLEN = 40, RDELAY = 300;
  localparam real PI = 3.14159265358979323846;

  logic clk, rst;
  logic rc_coef_we, rx_valid, map_valid, map_bank_swap, map_done;
  logic [$clog2(NC)-1:0] rc_coef_addr, map_range;
  logic [$clog2(NPER)-1:0] map_doppler;
  c16_t rc_coef_data, rx_data;
  c17_t map_data;
  logic adc_valid, store_en, recall, cfg_we, pulse_start, dac_valid;
  iq8_t adc_iq;
  logic [11:0] store_addr, recall_addr;
  logic [12:0] recall_len;
  logic [15:0] recall_delay;
  logic [8:0] cfg_addr;
  bin_cfg_t cfg;
  logic signed [15:0] dac_i, dac_q;
  `TB_CLOCK(clk)
  `TB_WATCHDOG(clk, 3000000)

  radar_drfm_top dut (
    .clk(clk), .rst(rst),
    .rc_coef_we(rc_coef_we), .rc_coef_addr(rc_coef_addr), .rc_coef_data(rc_coef_data),
    .rx_valid(rx_valid), .rx_data(rx_data),
    .map_valid(map_valid), .map_data(map_data), .map_range(map_range), .map_doppler(map_doppler),
    .map_bank_swap(map_bank_swap), .map_done(map_done),
    .adc_valid(adc_valid), .adc_iq(adc_iq), .store_en(store_en), .store_addr(store_addr),
    .recall(recall), .recall_addr(recall_addr), .recall_len(recall_len), .recall_delay(recall_delay),
    .cfg_we(cfg_we), .cfg_addr(cfg_addr), .cfg(cfg), .pulse_start(pulse_start),
    .dac_valid(dac_valid), .dac_i(dac_i), .dac_q(dac_q));

  // ---------------- radar side ----------------
  int nmap_out = 0, swaps = 0, drains = 0, dones = 0;
  int pk_r [NTOT/NMAPS], pk_k [NTOT/NMAPS];
  real pk_m [NTOT/NMAPS];
  logic drain_q = 1'b0;

  always @(posedge clk) begin
    if (!rst) begin
      logic draining;
      draining = dut.u_radar.u_df.u_fft.drain != 0 && !dut.u_radar.u_df.u_fft.take;
      if (draining && !drain_q) drains++;
      drain_q <= draining;
      if (map_bank_swap) swaps++;
      if (map_done) dones++;
      if (map_valid) begin
        int g;
        real mag;
        g = nmap_out / DEPTH;
        mag = real'(map_data.re) * real'(map_data.re) + real'(map_data.im) * real'(map_data.im);
        if (mag > pk_m[g]) begin pk_m[g] = mag; pk_r[g] = int'(map_range); pk_k[g] = int'(map_doppler); end
        nmap_out++;
      end
    end
  end

  task automatic run_radar();
    for (int k = 0; k < NC; k++) begin
      real a;
      a = PI / NC * real'((NC - 1 - k) * (NC - 1 - k)) - PI * real'(NC - 1 - k);
      rc_coef_we = 1'b1; rc_coef_addr = ($clog2(NC))'(k);
      rc_coef_data.re = 16'(int'($floor(32767.0 * $cos(a) + 0.5)));
      rc_coef_data.im = 16'(-int'($floor(32767.0 * $sin(a) + 0.5)));
      @(negedge clk);
    end
    rc_coef_we = 1'b0;
    for (int n = 0; n < NTOT * DEPTH; n++) begin
      real a;
      int kk;
      kk = ((n - DELAY) % NC + NC) % NC;
      a = PI / NC * real'(kk * kk) - PI * real'(kk) + 2.0 * PI * FD * real'(n) / real'(DEPTH);
      rx_valid = 1'b1;
      rx_data.re = 16'(int'($floor(300.0 * $cos(a) + 0.5)) + $urandom_range(0, 200) - 100);
      rx_data.im = 16'(int'($floor(300.0 * $sin(a) + 0.5)) + $urandom_range(0, 200) - 100);
      @(negedge clk);
    end
    rx_valid = 1'b0;
  endtask

  // ---------------- DRFM side ----------------
  int ph [NB], phinc [NB], g [NB], ginc [NB];
  int pulse_ph [PLEN];
  int clamps = 0, steps = 0, recalls = 0, dac_checks = 0;
  int cyc = 0, t_recall = 0, t_first_dac = -1;
  // expected DAC stream for the current pulse, indexed by clocks since the
  // first phase sample entered the range bins
  int exp_i [$], exp_q [$];

  function automatic int lut(input int p, input bit is_sin);
    real a;
    a = 2.0 * PI * real'(p) / 32.0;
    return int'($floor(127.0 * (is_sin ? $sin(a) : $cos(a)) + 0.5));
  endfunction

  task automatic build_pulse_expect();
    exp_i.delete(); exp_q.delete();
    for (int t = 0; t < PLEN + NB - 1; t++) begin
      int si, sq;
      si = 0; sq = 0;
      for (int r = 0; r < NB; r++)
        if (t - r >= 0 && t - r < PLEN) begin
          si += (lut((pulse_ph[t - r] + ph[r]) % 32, 0) * (1 << g[r])) >>> 5;
          sq += (lut((pulse_ph[t - r] + ph[r]) % 32, 1) * (1 << g[r])) >>> 5;
        end
      exp_i.push_back(int'(16'(si)));
      exp_q.push_back(int'(16'(sq)));
    end
  endtask

  always @(posedge clk) begin
    cyc++;
    if (!rst && dac_valid) begin
      int ei, eq;
      if (t_first_dac < 0) begin
        t_first_dac = cyc;
        // recall strobe -> read after 1+delay, data +1, phase converter 14, bins 4
        `CHECK(t_first_dac - t_recall == RDELAY + 2 + 14 + 4,
               ("first DAC sample %0d clocks after recall, expected %0d", t_first_dac - t_recall, RDELAY + 20))
      end
      ei = exp_i.pop_front();
      eq = exp_q.pop_front();
      `CHECK(int'(dac_i) == ei && int'(dac_q) == eq, ("DAC sample: got (%0d,%0d) expected (%0d,%0d)", dac_i, dac_q, ei, eq))
      dac_checks++;
    end
  end

  task automatic run_drfm();
    // capture one pulse: samples at exact phase angles 2*pi*p/32
    for (int n = 0; n < PLEN; n++) pulse_ph[n] = $urandom_range(0, 31);
    store_addr = 12'd1000;
    for (int n = 0; n < PLEN; n++) begin
      adc_valid = 1'b1; store_en = 1'b1;
      adc_iq.i = 8'(int'($floor(100.0 * $cos(2.0 * PI * pulse_ph[n] / 32.0) + 0.5)));
      adc_iq.q = 8'(int'($floor(100.0 * $sin(2.0 * PI * pulse_ph[n] / 32.0) + 0.5)));
      @(negedge clk);
    end
    adc_valid = 1'b0; store_en = 1'b0;
    // program the range bins
    for (int r = 0; r < NB; r++) begin
      cfg.phase = 5'($urandom); cfg.phase_inc = 5'($urandom_range(1, 31));
      cfg.gain = 4'(r % 11); cfg.gain_inc = 4'(1);
      cfg_we = 1'b1; cfg_addr = 9'(r);
      @(negedge clk);
      ph[r] = cfg.phase; phinc[r] = cfg.phase_inc; g[r] = cfg.gain; ginc[r] = cfg.gain_inc;
    end
    cfg_we = 1'b0;
    for (int p = 0; p < 3; p++) begin
      if (p > 0) begin
        pulse_start = 1'b1;
        @(negedge clk);
        pulse_start = 1'b0;
        steps++;
        for (int r = 0; r < NB; r++) begin
          ph[r] = (ph[r] + phinc[r]) % 32;
          if (g[r] + ginc[r] > 10) begin g[r] = 10; clamps++; end else g[r] += ginc[r];
        end
      end
      build_pulse_expect();
      t_first_dac = -1;
      recall = 1'b1; recall_addr = 12'd1000; recall_len = 13'(PLEN); recall_delay = 16'(RDELAY);
      t_recall = cyc + 1;
      @(negedge clk);
      recall = 1'b0;
      recalls++;
      repeat (RDELAY + PLEN + NB + 30) @(negedge clk);
      `CHECK(exp_i.size() == 0, ("pulse %0d: %0d DAC samples missing", p, exp_i.size()))
    end
  endtask

  initial begin
    for (int i = 0; i < NTOT / NMAPS; i++) pk_m[i] = -1.0;
    rst = 1'b1;
    rc_coef_we = 1'b0; rc_coef_addr = '0; rc_coef_data = '0; rx_valid = 1'b0; rx_data = '0;
    adc_valid = 1'b0; adc_iq = '0; store_en = 1'b0; store_addr = '0; recall = 1'b0;
    recall_addr = '0; recall_len = '0; recall_delay = '0; cfg_we = 1'b0; cfg_addr = '0;
    cfg = '0; pulse_start = 1'b0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    fork
      run_radar();
      run_drfm();
    join
    // the last map leaves after a full bank read-out and the FFT latency
    fork
      wait (dones == NTOT / NMAPS);
      repeat (2 * DEPTH + 4 * NPER + 1000) @(negedge clk);
    join_any
    disable fork;
    repeat (100) @(negedge clk);
    `CHECK(nmap_out == (NTOT / NMAPS) * DEPTH, ("%0d map points, expected %0d", nmap_out, (NTOT / NMAPS) * DEPTH))
    for (int i = 0; i < NTOT / NMAPS; i++)
      `CHECK(pk_r[i] == (DELAY + NC - 1) % NC && pk_k[i] == FD,
             ("map %0d peak at range %0d Doppler %0d, expected %0d/%0d", i, pk_r[i], pk_k[i], (DELAY + NC - 1) % NC, FD))
    `CHECK(swaps == NTOT, ("%0d bank swaps, expected %0d", swaps, NTOT))
    `CHECK(drains > 0, ("FFT drain never happened"))
    `CHECK(dones == NTOT / NMAPS, ("%0d integrations, expected %0d", dones, NTOT / NMAPS))
    `CHECK(recalls == 3 && dac_checks == 3 * (PLEN + NB - 1), ("%0d DAC samples checked, expected %0d", dac_checks, 3 * (PLEN + NB - 1)))
    `CHECK(steps > 0, ("pulse step never happened"))
    `CHECK(clamps > 0, ("gain clamp never reached"))
    $display("mechanisms: bank_swaps=%0d fft_drains=%0d integrations=%0d recalls=%0d pulse_steps=%0d gain_clamps=%0d",
             swaps, drains, dones, recalls, steps, clamps);
    `TB_FINISH
  end
endmodule
