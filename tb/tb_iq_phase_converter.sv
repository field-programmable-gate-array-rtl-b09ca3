// Checks the I/Q phase converter: random 8-bit I/Q samples (magnitude at
// least 16) must give round(atan2(Q,I)/(2*pi)*32) mod 32; samples whose exact
// angle lies within 0.06 of a rounding boundary accept either neighbour.
// Also checks the latency of STAGES+2 clocks with a single isolated sample.
`include "tb_common.svh"
module tb_iq_phase_converter;
  import radar_pkg::*;
  `TB_COUNTERS
  localparam int STAGES = 12;
  localparam real PI = 3.14159265358979323846;
  logic clk, rst, in_valid, out_valid;
  iq8_t iq;
  logic [4:0] phase;
  `TB_CLOCK(clk)
  `TB_WATCHDOG(clk, 20000)

  iq_phase_converter #(.PHASE_W(5), .STAGES(STAGES)) dut (
    .clk(clk), .rst(rst), .in_valid(in_valid), .iq(iq), .out_valid(out_valid), .phase(phase));

  iq8_t exp_q [$];
  int   lat;

  always @(posedge clk) begin
    if (in_valid) exp_q.push_back(iq);
    if (out_valid) begin
      iq8_t e;
      real a, f;
      int r;
      e = exp_q.pop_front();
      a = $atan2(real'(e.q), real'(e.i)) / (2.0 * PI) * 32.0;
      if (a < 0) a += 32.0;
      r = int'($floor(a + 0.5)) % 32;
      f = a - $floor(a);
      if (f > 0.44 && f < 0.56)
        `CHECK(phase == 5'(r) || phase == 5'(r - 1) || phase == 5'(r + 1),
               ("iq (%0d,%0d): got %0d expected about %0d", e.i, e.q, phase, r))
      else
        `CHECK(phase == 5'(r), ("iq (%0d,%0d): got %0d expected %0d", e.i, e.q, phase, r))
    end
  end

  initial begin
    rst = 1'b1; in_valid = 1'b0; iq = '0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    // latency of one isolated sample
    @(negedge clk); in_valid = 1'b1; iq.i = 8'sd100; iq.q = 8'sd0;
    @(negedge clk); in_valid = 1'b0;
    lat = 1;
    while (!out_valid) begin @(negedge clk); lat++; end
    `CHECK(lat == STAGES + 2, ("latency %0d expected %0d", lat, STAGES + 2))
    repeat (5) @(negedge clk);
    for (int n = 0; n < 4000; n++) begin
      int mi, mq;
      do begin
        mi = $urandom_range(0, 255) - 128;
        mq = $urandom_range(0, 255) - 128;
      end while (mi * mi + mq * mq < 256);
      iq.i = 8'(mi); iq.q = 8'(mq);
      in_valid = 1'($urandom_range(0, 3) != 0);
      @(negedge clk);
    end
    in_valid = 1'b0;
    repeat (STAGES + 5) @(negedge clk);
    `CHECK(exp_q.size() == 0, ("%0d samples never came out", exp_q.size()))
    `TB_FINISH
  end
endmodule
