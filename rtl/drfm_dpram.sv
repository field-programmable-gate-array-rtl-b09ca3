// High-speed dual-ported sample memory of the DRFM.
//
// One write port stores digitized I/Q samples while an independent read port
// replays stored samples, so capture and replay can overlap. The read is
// registered (one clock from address to data). DEPTH is not given by the
// document; 4096 words is this design's choice. Writes and reads to the
// same address in the same clock return the old word.
module drfm_dpram
  import radar_pkg::*;
#(
  parameter int unsigned DEPTH = 4096
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  iq8_t                     wdata,
  input  logic                     re,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output iq8_t                     rdata
);
  iq8_t mem [DEPTH];
  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
