// Checks one range bin modulator against a model built from the equations:
// contribution = sign-extended bits 17..5 of (round(127*cos/sin(2*pi*p/32)) * 2^g)
// with p = phase_in + phase register (mod 32), added to a random previous-bin
// sum, four clocks after the sample. Covers coefficient preload, per-pulse
// phase and gain increments, the gain clamp at 10, idle cycles (adds zero)
// and the 5-bit expansion outputs.
`include "tb_common.svh"
module tb_drfm_range_bin;
  import radar_pkg::*;
  `TB_COUNTERS
  localparam real PI = 3.14159265358979323846;
  logic clk, rst, cfg_load, pulse_start, in_valid;
  bin_cfg_t cfg;
  logic [4:0] phase_in, exp_i, exp_q;
  logic signed [15:0] sum_in_i, sum_in_q, sum_out_i, sum_out_q;
  `TB_CLOCK(clk)
  `TB_WATCHDOG(clk, 50000)

  drfm_range_bin dut (
    .clk(clk), .rst(rst), .cfg_load(cfg_load), .cfg(cfg), .pulse_start(pulse_start),
    .in_valid(in_valid), .phase_in(phase_in), .sum_in_i(sum_in_i), .sum_in_q(sum_in_q),
    .sum_out_i(sum_out_i), .sum_out_q(sum_out_q), .exp_i(exp_i), .exp_q(exp_q));

  int ph = 0, phinc = 0, g = 0, ginc = 0, clamps = 0;
  // expected outputs, index = cycle
  int ei [$], eq [$], exi [$], exq [$];
  int cyc = 0;

  function automatic int lut(input int p, input bit is_sin);
    real a;
    a = 2.0 * PI * real'(p) / 32.0;
    return int'($floor(127.0 * (is_sin ? $sin(a) : $cos(a)) + 0.5));
  endfunction

  task automatic expect_out(input bit v, input int p, input int sii, input int siq);
    int vi, vq, pi_, pq;
    vi = lut((p + ph) % 32, 0) * (1 << g);
    vq = lut((p + ph) % 32, 1) * (1 << g);
    pi_ = v ? (vi >>> 5) : 0;
    pq = v ? (vq >>> 5) : 0;
    ei.push_back(int'(16'(sii + pi_)));
    eq.push_back(int'(16'(siq + pq)));
    exi.push_back(vi & 31);
    exq.push_back(vq & 31);
  endtask

  initial begin
    rst = 1'b1; cfg_load = 1'b0; pulse_start = 1'b0; in_valid = 1'b0; cfg = '0;
    phase_in = '0; sum_in_i = '0; sum_in_q = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int pulse = 0; pulse < 40; pulse++) begin
      if (pulse % 10 == 0) begin
        cfg.phase = 5'($urandom); cfg.phase_inc = 5'($urandom);
        cfg.gain = 4'($urandom_range(0, 10)); cfg.gain_inc = 4'($urandom_range(0, 3));
        cfg_load = 1'b1;
        @(negedge clk);
        cfg_load = 1'b0;
        ph = cfg.phase; phinc = cfg.phase_inc; g = cfg.gain; ginc = cfg.gain_inc;
      end else begin
        pulse_start = 1'b1;
        @(negedge clk);
        pulse_start = 1'b0;
        ph = (ph + phinc) % 32;
        if (g + ginc > 10) begin g = 10; clamps++; end else g = g + ginc;
      end
      repeat (4) @(negedge clk);
      for (int m = 0; m < 60; m++) begin
        in_valid = 1'($urandom_range(0, 4) != 0);
        phase_in = 5'($urandom);
        sum_in_i = 16'($urandom_range(0, 20000) - 10000);
        sum_in_q = 16'($urandom_range(0, 20000) - 10000);
        // the sum input is used at the output stage: 3 clocks after phase_in
        fork
          begin
            automatic bit v = in_valid;
            automatic int p = phase_in;
            repeat (3) @(negedge clk);
            expect_out(v, p, int'(sum_in_i), int'(sum_in_q));
            @(posedge clk); #1;
            begin
              int a, b, c, d;
              a = ei.pop_front(); b = eq.pop_front(); c = exi.pop_front(); d = exq.pop_front();
              `CHECK(int'(sum_out_i) == a && int'(sum_out_q) == b,
                     ("phase %0d g %0d v %0b: got (%0d,%0d) expected (%0d,%0d)", p, g, v, sum_out_i, sum_out_q, a, b))
              if (v) `CHECK(int'(exp_i) == c && int'(exp_q) == d, ("expansion got (%0d,%0d) expected (%0d,%0d)", exp_i, exp_q, c, d))
            end
          end
        join_none
        @(negedge clk);
      end
      in_valid = 1'b0;
      repeat (6) @(negedge clk);
    end
    `CHECK(clamps > 0, ("gain clamp never exercised"))
    `TB_FINISH
  end
endmodule
