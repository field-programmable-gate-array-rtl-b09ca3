// Checks the streaming FFT (16 points) against a direct DFT computed in
// floating point. Three frames go in back to back, then after a gap a fourth
// frame arrives on its own, so the last frame of each burst must come out
// through the self-drain. A fourth frame has gaps inside it (the pipeline
// stalls) and a fifth arrives while drain frames run (it waits in the FIFO). Each output must match its bin (out_bin, the
// bit-reversed position) within 0.1% of full scale plus 24 LSB; the first
// output must come N + LOG2N*(CORDIC_STAGES+2) cycles after the first
// input, and every input frame must come out exactly once.
`include "tb_common.svh"
module tb_fft_r2sdf;
  `TB_COUNTERS
  localparam int LOG2N = 4, N = 16, IN_W = 20, CS = 16;
  localparam int LAT = N + LOG2N * (CS + 2);
  localparam real PI = 3.14159265358979323846;
  logic clk, rst, in_valid, out_valid;
  logic signed [IN_W-1:0] in_re, in_im;
  logic signed [IN_W+LOG2N-1:0] out_re, out_im;
  logic [LOG2N-1:0] out_bin;
  `TB_CLOCK(clk)
  `TB_WATCHDOG(clk, 20000)

  fft_r2sdf #(.LOG2N(LOG2N), .IN_W(IN_W), .TW_W(18), .CORDIC_STAGES(CS)) dut (
    .clk(clk), .rst(rst), .in_valid(in_valid), .in_re(in_re), .in_im(in_im),
    .out_valid(out_valid), .out_bin(out_bin), .out_re(out_re), .out_im(out_im));

  int xr [5][N], xi [5][N];
  int stalls = 0, waits = 0;
  int frame_out = 0, pos_out = 0, outs = 0;
  int t = 0, t_first_in = -1, t_first_out = -1;

  always @(posedge clk) begin
    t++;
    if (!rst && !dut.en && dut.frame_real && dut.in_pos != 0) stalls++;
    if (!rst && in_valid && !dut.take && !dut.frame_real && dut.in_pos != 0) waits++;
    if (in_valid && t_first_in < 0) t_first_in = t;
    if (out_valid) begin
      real er, ei, tol;
      int k;
      if (t_first_out < 0) t_first_out = t;
      k = int'(out_bin);
      er = 0; ei = 0;
      for (int n = 0; n < N; n++) begin
        er += real'(xr[frame_out][n]) * $cos(2*PI*k*n/N) + real'(xi[frame_out][n]) * $sin(2*PI*k*n/N);
        ei += real'(xi[frame_out][n]) * $cos(2*PI*k*n/N) - real'(xr[frame_out][n]) * $sin(2*PI*k*n/N);
      end
      tol = 0.001 * N * 524288.0 + 24.0;
      `CHECK((real'(out_re) - er) < tol && (er - real'(out_re)) < tol &&
             (real'(out_im) - ei) < tol && (ei - real'(out_im)) < tol,
             ("frame %0d bin %0d: got (%0d,%0d) expected (%0.1f,%0.1f)", frame_out, k, out_re, out_im, er, ei))
      outs++;
      pos_out++;
      if (pos_out == N) begin pos_out = 0; frame_out++; end
    end
  end

  task automatic send(input int f, input bit gaps);
    for (int n = 0; n < N; n++) begin
      while (gaps && $urandom_range(0, 2) == 0) begin in_valid = 1'b0; @(negedge clk); end
      in_valid = 1'b1;
      in_re = IN_W'(xr[f][n]);
      in_im = IN_W'(xi[f][n]);
      @(negedge clk);
    end
    in_valid = 1'b0;
  endtask

  initial begin
    for (int f = 0; f < 5; f++)
      for (int n = 0; n < N; n++) begin
        xr[f][n] = $urandom_range(0, 1 << (IN_W - 1)) - (1 << (IN_W - 2));
        xi[f][n] = $urandom_range(0, 1 << (IN_W - 1)) - (1 << (IN_W - 2));
      end
    // a pure tone in frame 1: bin 3 only
    for (int n = 0; n < N; n++) begin
      xr[1][n] = int'(200000.0 * $cos(2*PI*3*n/N));
      xi[1][n] = int'(200000.0 * $sin(2*PI*3*n/N));
    end
    rst = 1'b1; in_valid = 1'b0; in_re = '0; in_im = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    send(0, 0); send(1, 0); send(2, 0);
    repeat (3 * LAT) @(negedge clk);
    // a frame with gaps inside it, then one arriving while the drain runs
    send(3, 1);
    repeat (N + 5) @(negedge clk);
    send(4, 0);
    repeat (3 * LAT) @(negedge clk);
    `CHECK(outs == 5 * N, ("%0d outputs, expected %0d", outs, 5 * N))
    `CHECK(stalls > 0, ("no stall inside a frame"))
    `CHECK(waits > 0, ("no frame waited for a drain frame to end"))
    $display("mechanisms: stalls=%0d frame_waits=%0d", stalls, waits);
    `CHECK(t_first_out - t_first_in == LAT, ("latency %0d expected %0d", t_first_out - t_first_in, LAT))
    `TB_FINISH
  end
endmodule
