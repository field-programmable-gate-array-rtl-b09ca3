// Checks the Doppler filter with 16 code periods per range bin: three range
// bins back to back, then one more after a gap. The expected spectrum is
// computed in floating point from the same input, windowed by the exact
// Blackman formula (rounded to Q15), transformed by a direct DFT, shifted by
// 2^-(13+LOG2N-3) (full growth -> sfix35_En49 -> sfix16_En36) and saturated; outputs must match
// within 2 LSB in the Doppler bin given by out_bin. Bin 5 of the second range
// bin is a pure tone and must be the largest output of its frame.
`include "tb_common.svh"
module tb_doppler_filter;
  import radar_pkg::*;
  `TB_COUNTERS
  localparam int LOG2N = 4, N = 16, CS = 16;
  localparam real PI = 3.14159265358979323846;
  logic clk, rst, enb_in, enb_out;
  c16_t data_in, data_out;
  logic [LOG2N-1:0] out_bin;
  `TB_CLOCK(clk)
  `TB_WATCHDOG(clk, 20000)

  doppler_filter #(.LOG2N(LOG2N), .CORDIC_STAGES(CS)) dut (
    .clk(clk), .rst(rst), .enb_in(enb_in), .data_in(data_in),
    .enb_out(enb_out), .out_bin(out_bin), .data_out(data_out));

  int xr [4][N], xi [4][N];
  int frame_out = 0, pos_out = 0, outs = 0, peak_bin = -1, peak_mag = -1;

  function automatic real clip(input real v);
    if (v > 32767.0) return 32767.0;
    if (v < -32768.0) return -32768.0;
    return v;
  endfunction

  always @(posedge clk) begin
    if (enb_out) begin
      real er, ei, w;
      int k;
      k = int'(out_bin);
      er = 0; ei = 0;
      for (int n = 0; n < N; n++) begin
        w = $floor((0.42 - 0.5 * $cos(2*PI*n/(N-1)) + 0.08 * $cos(4*PI*n/(N-1))) * 32768.0 + 0.5);
        if (w > 32767.0) w = 32767.0;
        er += w * (real'(xr[frame_out][n]) * $cos(2*PI*k*n/N) + real'(xi[frame_out][n]) * $sin(2*PI*k*n/N));
        ei += w * (real'(xi[frame_out][n]) * $cos(2*PI*k*n/N) - real'(xr[frame_out][n]) * $sin(2*PI*k*n/N));
      end
      er = clip($floor(er / real'(1 << (13 + LOG2N - 3))));
      ei = clip($floor(ei / real'(1 << (13 + LOG2N - 3))));
      `CHECK((real'(data_out.re) - er) <= 2.0 && (er - real'(data_out.re)) <= 2.0 &&
             (real'(data_out.im) - ei) <= 2.0 && (ei - real'(data_out.im)) <= 2.0,
             ("range bin %0d Doppler bin %0d: got (%0d,%0d) expected (%0.0f,%0.0f)",
              frame_out, k, data_out.re, data_out.im, er, ei))
      if (frame_out == 1 && (data_out.re * data_out.re + data_out.im * data_out.im) > peak_mag) begin
        peak_mag = data_out.re * data_out.re + data_out.im * data_out.im;
        peak_bin = k;
      end
      outs++;
      pos_out++;
      if (pos_out == N) begin pos_out = 0; frame_out++; end
    end
  end

  task automatic send(input int f);
    for (int n = 0; n < N; n++) begin
      enb_in = 1'b1;
      data_in.re = 16'(xr[f][n]);
      data_in.im = 16'(xi[f][n]);
      @(negedge clk);
    end
    enb_in = 1'b0;
  endtask

  initial begin
    for (int f = 0; f < 4; f++)
      for (int n = 0; n < N; n++) begin
        xr[f][n] = $urandom_range(0, 600) - 300;
        xi[f][n] = $urandom_range(0, 600) - 300;
      end
    for (int n = 0; n < N; n++) begin
      xr[1][n] = int'(250.0 * $cos(2*PI*5*n/N));
      xi[1][n] = int'(250.0 * $sin(2*PI*5*n/N));
    end
    rst = 1'b1; enb_in = 1'b0; data_in = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    send(0); send(1); send(2);
    repeat (400) @(negedge clk);
    send(3);
    repeat (400) @(negedge clk);
    `CHECK(outs == 4 * N, ("%0d outputs, expected %0d", outs, 4 * N))
    `CHECK(peak_bin == 5, ("tone peak in bin %0d, expected 5", peak_bin))
    `TB_FINISH
  end
endmodule
