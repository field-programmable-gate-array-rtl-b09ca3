// Checks the corner-turn storage with 3 range bins and 4 code periods per
// bank. Four maps are written with random gaps in enb_in; every map must come
// out transposed (range bin by range bin, all periods of a bin in order), in
// map order, with no sample lost or repeated. Checks that the banks swap once
// per map and that each read burst is contiguous.
`include "tb_common.svh"
module tb_data_storage;
  import radar_pkg::*;
  `TB_COUNTERS
  localparam int NC = 3, NPER = 4, DEPTH = NC * NPER, NMAP = 4;
  logic clk, rst, enb_in, enb_out, bank_swap;
  c16_t store_in, store_out;
  `TB_CLOCK(clk)
  `TB_WATCHDOG(clk, 20000)

  data_storage #(.NC(NC), .NPER(NPER)) dut (
    .clk(clk), .rst(rst), .enb_in(enb_in), .store_in(store_in),
    .enb_out(enb_out), .store_out(store_out), .bank_swap(bank_swap));

  // Sample value encodes (map, period, range bin).
  function automatic c16_t val(input int m, input int p, input int r);
    val.re = 16'(m * 1000 + p * 10 + r);
    val.im = 16'(-(m * 1000 + p * 10 + r));
  endfunction

  int nout = 0, swaps = 0, bursts = 0;
  logic enb_q = 1'b0;
  always @(posedge clk) begin
    if (bank_swap) swaps++;
    enb_q <= enb_out;
    if (enb_out && !enb_q) bursts++;
    if (enb_out) begin
      int m, r, p;
      c16_t e;
      m = nout / DEPTH;
      r = (nout % DEPTH) / NPER;
      p = nout % NPER;
      e = val(m, p, r);
      `CHECK(store_out == e, ("output %0d: got %0d expected %0d (map %0d bin %0d period %0d)",
                              nout, int'(store_out.re), int'(e.re), m, r, p))
      nout++;
    end
  end

  initial begin
    rst = 1'b1; enb_in = 1'b0; store_in = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int m = 0; m < NMAP; m++)
      for (int p = 0; p < NPER; p++)
        for (int r = 0; r < NC; r++) begin
          while ($urandom_range(0, 2) == 0) begin enb_in = 1'b0; @(negedge clk); end
          enb_in = 1'b1;
          store_in = val(m, p, r);
          @(negedge clk);
        end
    enb_in = 1'b0;
    repeat (2 * DEPTH + 5) @(negedge clk);
    `CHECK(nout == NMAP * DEPTH, ("%0d samples out, expected %0d", nout, NMAP * DEPTH))
    `CHECK(swaps == NMAP, ("%0d bank swaps, expected %0d", swaps, NMAP))
    `CHECK(bursts == NMAP, ("%0d read bursts, expected %0d", bursts, NMAP))
    `TB_FINISH
  end
endmodule
