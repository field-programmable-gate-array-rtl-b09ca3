// End-to-end check of one compression channel at reduced size: 6 subcodes,
// 8 code periods per map, 2 maps integrated, 4 maps in total (2 integrated
// outputs). The received signal is a P4-coded echo (phase
// pi/Nc*k^2 - pi*k) delayed by 2 subcodes, with a Doppler shift of 3 cycles
// per map, plus noise; the correlator holds the conjugate reference.
// A model in the testbench runs the same chain: bit-exact correlator, corner
// turn, Q15 Blackman window and direct DFT (floating point, floored after the
// 2^-13 scaling), and integration. Every output point must match within
// 2 LSB per integrated map, and the largest point of each integrated map must
// sit at the expected range and Doppler bin. Counts the bank swaps, the FFT
// self-drains and the completed integrations; each must happen.
`include "tb_common.svh"
module tb_three_stage_compression;
  import radar_pkg::*;
  `TB_COUNTERS
  localparam int NC = 6, NPER = 8, NMAPS = 2, NTOT = 4, CS = 16;
  localparam int DEPTH = NC * NPER;
  localparam int DELAY = 2, FD = 3;
  localparam real PI = 3.14159265358979323846;
  logic clk, rst, coef_we, in_valid, out_valid, bank_swap, map_done;
  logic [$clog2(NC)-1:0] coef_addr, out_range;
  logic [$clog2(NPER)-1:0] out_doppler;
  c16_t coef_data, in_data;
  c17_t out_data;
  `TB_CLOCK(clk)
  `TB_WATCHDOG(clk, 100000)

  three_stage_compression #(.NC(NC), .NPER(NPER), .NMAPS(NMAPS), .CORDIC_STAGES(CS)) dut (
    .clk(clk), .rst(rst), .coef_we(coef_we), .coef_addr(coef_addr), .coef_data(coef_data),
    .in_valid(in_valid), .in_data(in_data), .out_valid(out_valid), .out_data(out_data),
    .out_range(out_range), .out_doppler(out_doppler), .bank_swap(bank_swap), .map_done(map_done));

  // ---- reference model -------------------------------------------------
  longint cr [NC], ci [NC];
  longint xr [NTOT*DEPTH], xi [NTOT*DEPTH];
  longint yr [NTOT*DEPTH], yi [NTOT*DEPTH];          // correlator output
  real    ir [NTOT/NMAPS][NC][NPER], ii [NTOT/NMAPS][NC][NPER];

  function automatic longint s16(input longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction
  function automatic real clip(input real v, input real lim);
    if (v > lim - 1.0) return lim - 1.0;
    if (v < -lim) return -lim;
    return v;
  endfunction

  task automatic build_model();
    for (int n = 0; n < NTOT * DEPTH; n++) begin
      longint sr, si;
      sr = 0; si = 0;
      for (int k = 0; k < NC; k++)
        for (int p = 0; p < 2; p++) begin
          int idx;
          longint ar, ai;
          idx = n - k - p * NC;
          ar = (idx >= 0) ? xr[idx] : 0;
          ai = (idx >= 0) ? xi[idx] : 0;
          sr += s16((ar * cr[k] - ai * ci[k]) >>> 15);
          si += s16((ar * ci[k] + ai * cr[k]) >>> 15);
        end
      yr[n] = s16(sr >>> 6);
      yi[n] = s16(si >>> 6);
    end
    for (int g = 0; g < NTOT / NMAPS; g++)
      for (int r = 0; r < NC; r++)
        for (int k = 0; k < NPER; k++) begin ir[g][r][k] = 0; ii[g][r][k] = 0; end
    for (int m = 0; m < NTOT; m++)
      for (int r = 0; r < NC; r++)
        for (int k = 0; k < NPER; k++) begin
          real er, ei, w;
          er = 0; ei = 0;
          for (int p = 0; p < NPER; p++) begin
            w = $floor((0.42 - 0.5 * $cos(2*PI*p/(NPER-1)) + 0.08 * $cos(4*PI*p/(NPER-1))) * 32768.0 + 0.5);
            if (w > 32767.0) w = 32767.0;
            er += w * (real'(yr[m*DEPTH + p*NC + r]) * $cos(2*PI*k*p/NPER) + real'(yi[m*DEPTH + p*NC + r]) * $sin(2*PI*k*p/NPER));
            ei += w * (real'(yi[m*DEPTH + p*NC + r]) * $cos(2*PI*k*p/NPER) - real'(yr[m*DEPTH + p*NC + r]) * $sin(2*PI*k*p/NPER));
          end
          ir[m / NMAPS][r][k] += clip($floor(er / 8192.0), 32768.0);
          ii[m / NMAPS][r][k] += clip($floor(ei / 8192.0), 32768.0);
        end
  endtask

  // ---- output checking ---------------------------------------------------
  int nout = 0, swaps = 0, drains = 0, dones = 0;
  int pk_r [NTOT/NMAPS], pk_k [NTOT/NMAPS];
  real pk_m [NTOT/NMAPS];
  logic drain_q = 1'b0;

  always @(posedge clk) begin
    if (!rst) begin
      logic draining;
      draining = dut.u_df.u_fft.drain != 0 && !dut.u_df.u_fft.in_valid;
      if (draining && !drain_q) drains++;
      drain_q <= draining;
      if (bank_swap) swaps++;
      if (map_done) dones++;
      if (out_valid) begin
        int g, r, k;
        real er, ei, tol, mag;
        g = nout / DEPTH;
        r = int'(out_range);
        k = int'(out_doppler);
        `CHECK(r == (nout % DEPTH) / NPER, ("output %0d: range tag %0d expected %0d", nout, r, (nout % DEPTH) / NPER))
        er = clip(ir[g][r][k], 65536.0);
        ei = clip(ii[g][r][k], 65536.0);
        tol = 2.0 * NMAPS;
        `CHECK((real'(out_data.re) - er) <= tol && (er - real'(out_data.re)) <= tol &&
               (real'(out_data.im) - ei) <= tol && (ei - real'(out_data.im)) <= tol,
               ("group %0d range %0d Doppler %0d: got (%0d,%0d) expected (%0.0f,%0.0f)",
                g, r, k, int'(out_data.re), int'(out_data.im), er, ei))
        mag = real'(out_data.re) * real'(out_data.re) + real'(out_data.im) * real'(out_data.im);
        if (mag > pk_m[g]) begin pk_m[g] = mag; pk_r[g] = r; pk_k[g] = k; end
        nout++;
      end
    end
  end

  initial begin
    for (int g = 0; g < NTOT / NMAPS; g++) pk_m[g] = -1.0;
    // P4 reference s[k] and the correlator coefficients c[k] = conj(s[NC-1-k])
    for (int k = 0; k < NC; k++) begin
      real a;
      a = PI / NC * real'((NC - 1 - k) * (NC - 1 - k)) - PI * real'(NC - 1 - k);
      cr[k] = longint'($floor(32767.0 * $cos(a) + 0.5));
      ci[k] = -longint'($floor(32767.0 * $sin(a) + 0.5));
    end
    for (int n = 0; n < NTOT * DEPTH; n++) begin
      real a;
      int kk;
      kk = ((n - DELAY) % NC + NC) % NC;
      a = PI / NC * real'(kk * kk) - PI * real'(kk) + 2.0 * PI * FD * real'(n) / real'(DEPTH);
      xr[n] = longint'($floor(6000.0 * $cos(a) + 0.5)) + longint'($urandom_range(0, 400)) - 200;
      xi[n] = longint'($floor(6000.0 * $sin(a) + 0.5)) + longint'($urandom_range(0, 400)) - 200;
    end
    build_model();

    rst = 1'b1; coef_we = 1'b0; coef_addr = '0; coef_data = '0; in_valid = 1'b0; in_data = '0;
    repeat (2) @(negedge clk);
    for (int k = 0; k < NC; k++) begin
      coef_we = 1'b1; coef_addr = ($clog2(NC))'(k);
      coef_data.re = 16'(cr[k]); coef_data.im = 16'(ci[k]);
      @(negedge clk);
    end
    coef_we = 1'b0;
    rst = 1'b0;
    for (int n = 0; n < NTOT * DEPTH; n++) begin
      while ($urandom_range(0, 4) == 0) begin in_valid = 1'b0; @(negedge clk); end
      in_valid = 1'b1;
      in_data.re = 16'(xr[n]);
      in_data.im = 16'(xi[n]);
      @(negedge clk);
    end
    in_valid = 1'b0;
    repeat (2000) @(negedge clk);
    `CHECK(nout == (NTOT / NMAPS) * DEPTH, ("%0d outputs, expected %0d", nout, (NTOT / NMAPS) * DEPTH))
    for (int g = 0; g < NTOT / NMAPS; g++)
      `CHECK(pk_r[g] == (DELAY + NC - 1) % NC && pk_k[g] == FD * NPER / NPER % NPER,
             ("group %0d peak at range %0d Doppler %0d, expected %0d/%0d", g, pk_r[g], pk_k[g], (DELAY + NC - 1) % NC, FD))
    `CHECK(swaps == NTOT, ("%0d bank swaps, expected %0d", swaps, NTOT))
    `CHECK(drains > 0, ("FFT self-drain never happened"))
    `CHECK(dones == NTOT / NMAPS, ("%0d integrations completed, expected %0d", dones, NTOT / NMAPS))
    $display("mechanisms: bank_swaps=%0d fft_drains=%0d integrations=%0d", swaps, drains, dones);
    `TB_FINISH
  end
endmodule
