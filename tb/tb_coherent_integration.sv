// Checks coherent integration of 4 maps of 8 points, over three groups, with
// random gaps in enb_in. Inputs are random and occasionally full scale so the
// 17-bit output saturates. During the last map of each group every output
// must equal sat17(sum of the 4 inputs at that point), one clock after its
// input; no output may appear during the other maps; map_done must pulse once
// per group.
`include "tb_common.svh"
module tb_coherent_integration;
  import radar_pkg::*;
  `TB_COUNTERS
  localparam int DEPTH = 8, NMAPS = 4, NGRP = 3;
  logic clk, rst, enb_in, enb_out, map_done;
  c16_t data_in;
  c17_t data_out;
  `TB_CLOCK(clk)
  `TB_WATCHDOG(clk, 20000)

  coherent_integration #(.DEPTH(DEPTH), .NMAPS(NMAPS)) dut (
    .clk(clk), .rst(rst), .enb_in(enb_in), .data_in(data_in),
    .enb_out(enb_out), .data_out(data_out), .map_done(map_done));

  int sr [DEPTH], si [DEPTH];
  int nin = 0, nout = 0, ndone = 0;
  logic exp_vld = 1'b0;
  int exp_r, exp_i;

  function automatic int s17(input int v);
    if (v > 65535) return 65535;
    if (v < -65536) return -65536;
    return v;
  endfunction

  always @(posedge clk) begin
    if (!rst) `CHECK(enb_out == exp_vld, ("enb_out %0b expected %0b", enb_out, exp_vld))
    if (!rst && enb_out && exp_vld)
      `CHECK(int'(data_out.re) == exp_r && int'(data_out.im) == exp_i,
             ("output %0d: got (%0d,%0d) expected (%0d,%0d)", nout, int'(data_out.re), int'(data_out.im), exp_r, exp_i))
    if (!rst && enb_out) nout++;
    if (!rst && map_done) ndone++;
    exp_vld <= 1'b0;
    if (!rst && enb_in) begin
      int pt, mp;
      pt = nin % DEPTH;
      mp = (nin / DEPTH) % NMAPS;
      if (mp == 0) begin sr[pt] = 0; si[pt] = 0; end
      sr[pt] += int'(data_in.re);
      si[pt] += int'(data_in.im);
      if (mp == NMAPS - 1) begin
        exp_vld <= 1'b1;
        exp_r = s17(sr[pt]);
        exp_i = s17(si[pt]);
      end
      nin++;
    end
  end

  initial begin
    rst = 1'b1; enb_in = 1'b0; data_in = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < NGRP * NMAPS * DEPTH; n++) begin
      while ($urandom_range(0, 2) == 0) begin enb_in = 1'b0; @(negedge clk); end
      enb_in = 1'b1;
      if (n / (NMAPS * DEPTH) == 1) begin
        data_in.re = 16'sd30000 - 16'($urandom_range(0, 100));
        data_in.im = -16'sd30000 + 16'($urandom_range(0, 100));
      end else begin
        data_in.re = 16'($urandom_range(0, 40000) - 20000);
        data_in.im = 16'($urandom_range(0, 40000) - 20000);
      end
      @(negedge clk);
    end
    enb_in = 1'b0;
    repeat (5) @(negedge clk);
    `CHECK(nout == NGRP * DEPTH, ("%0d outputs, expected %0d", nout, NGRP * DEPTH))
    `CHECK(ndone == NGRP, ("%0d map_done pulses, expected %0d", ndone, NGRP))
    `TB_FINISH
  end
endmodule
