// Checks the image synthesizer chain with 4 range bins against equation
// I(m) = sum_r 2^g(r) * exp(j*(phi(m-r) + phi_inc(r))) as the hardware
// quantizes it: each bin's part is bits 17..5 of round(127*cos/sin) * 2^g,
// bin r's part delayed by r samples, and the sum 4 clocks after the sample.
// Each bin gets its own coefficients through the configuration bus; several
// pulses advance the phase and gain registers. out_valid must cover exactly
// the clocks that carry a contribution of a valid sample.
`include "tb_common.svh"
module tb_dis_array;
  import radar_pkg::*;
  `TB_COUNTERS
  localparam int NB = 4;
  localparam real PI = 3.14159265358979323846;
  logic clk, rst, cfg_we, pulse_start, in_valid, out_valid;
  logic [$clog2(NB)-1:0] cfg_addr;
  bin_cfg_t cfg;
  logic [4:0] phase;
  logic signed [15:0] out_i, out_q;
  `TB_CLOCK(clk)
  `TB_WATCHDOG(clk, 50000)

  dis_array #(.NBINS(NB)) dut (
    .clk(clk), .rst(rst), .cfg_we(cfg_we), .cfg_addr(cfg_addr), .cfg(cfg),
    .pulse_start(pulse_start), .in_valid(in_valid), .phase(phase),
    .out_valid(out_valid), .out_i(out_i), .out_q(out_q));

  int ph [NB], phinc [NB], g [NB], ginc [NB];
  // per-cycle history of the input, and the per-bin contribution computed
  // with the coefficients in force when the sample entered
  int hv [$], hci [$][NB], hcq [$][NB];

  function automatic int lut(input int p, input bit is_sin);
    real a;
    a = 2.0 * PI * real'(p) / 32.0;
    return int'($floor(127.0 * (is_sin ? $sin(a) : $cos(a)) + 0.5));
  endfunction

  int cyc = 0, nvalid = 0;
  always @(posedge clk) begin
    if (!rst) begin
      int ci [NB], cq [NB];
      for (int r = 0; r < NB; r++) begin
        ci[r] = in_valid ? ((lut((int'(phase) + ph[r]) % 32, 0) * (1 << g[r])) >>> 5) : 0;
        cq[r] = in_valid ? ((lut((int'(phase) + ph[r]) % 32, 1) * (1 << g[r])) >>> 5) : 0;
      end
      hv.push_front(int'(in_valid));
      hci.push_front(ci);
      hcq.push_front(cq);
      cyc++;
    end
  end

  always @(negedge clk) begin
    // output now reflects samples that entered 4 + r clocks ago for bin r
    if (!rst && cyc > NB + 4) begin
      int ei, eq, anyv;
      ei = 0; eq = 0; anyv = 0;
      for (int r = 0; r < NB; r++) begin
        ei += hci[3 + r][r];
        eq += hcq[3 + r][r];
        anyv |= hv[3 + r];
      end
      `CHECK(int'(out_i) == int'(16'(ei)) && int'(out_q) == int'(16'(eq)),
             ("cycle %0d: got (%0d,%0d) expected (%0d,%0d)", cyc, out_i, out_q, 16'(ei), 16'(eq)))
      `CHECK(out_valid == anyv[0], ("cycle %0d: out_valid %0b expected %0b", cyc, out_valid, anyv[0]))
      if (out_valid) nvalid++;
    end
  end

  initial begin
    rst = 1'b1; cfg_we = 1'b0; cfg_addr = '0; cfg = '0; pulse_start = 1'b0; in_valid = 1'b0; phase = '0;
    for (int r = 0; r < NB; r++) begin ph[r] = 0; phinc[r] = 0; g[r] = 0; ginc[r] = 0; end
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int r = 0; r < NB; r++) begin
      cfg.phase = 5'($urandom); cfg.phase_inc = 5'($urandom);
      cfg.gain = 4'($urandom_range(0, 8)); cfg.gain_inc = 4'($urandom_range(0, 1));
      cfg_we = 1'b1; cfg_addr = ($clog2(NB))'(r);
      @(negedge clk);
      ph[r] = cfg.phase; phinc[r] = cfg.phase_inc; g[r] = cfg.gain; ginc[r] = cfg.gain_inc;
    end
    cfg_we = 1'b0;
    for (int pulse = 0; pulse < 6; pulse++) begin
      repeat (NB + 6) @(negedge clk);
      if (pulse > 0) begin
        pulse_start = 1'b1;
        @(negedge clk);
        pulse_start = 1'b0;
        for (int r = 0; r < NB; r++) begin
          ph[r] = (ph[r] + phinc[r]) % 32;
          g[r] = (g[r] + ginc[r] > 10) ? 10 : g[r] + ginc[r];
        end
      end
      for (int m = 0; m < 50; m++) begin
        in_valid = 1'($urandom_range(0, 5) != 0);
        phase = 5'($urandom);
        @(negedge clk);
      end
      in_valid = 1'b0;
    end
    repeat (NB + 8) @(negedge clk);
    `CHECK(nvalid > 0, ("out_valid never high"))
    `TB_FINISH
  end
endmodule
