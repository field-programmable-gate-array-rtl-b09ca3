// Digital image synthesizer: a chain of NBINS identical range bin modulators
// that builds a structured false target from an intercepted pulse.
//
// Every bin receives the same 5-bit phase sample in the same clock. Each bin
// rotates it by its own phase, scales it by 2^g and adds it to the partial sum
// from the bin before it; the sum register in each bin delays the partial sum
// by one sample. The output is therefore
//   I(m) = sum_r 2^g(r) * exp(j*(phi(m-r) + phi_inc(r)))
// where range bin r is the bin r places from the end of the chain (chain
// position NBINS-1-r). Per-bin gains and phase steps shape the target's
// extent, amplitude and Doppler.
//
// Interface: cfg_we with cfg_addr (range bin r) and cfg writes one bin's
// coefficients, as the control processor would; pulse_start advances every
// bin's phase and gain registers for the next pulse. phase/in_valid in;
// out_i/out_q out; range bin r's part of a sample leaves 4 + r clocks after
// the sample enters. out_valid is high while any contribution of a valid sample is still
// leaving the chain. NBINS = 512 follows the name of the synthesizer in the
// document; the configuration bus is this design's own choice. Each bin's
// 5-bit expansion fields are kept for future use and are not brought out of
// the array, so lint reports them as unused.
module dis_array
  import radar_pkg::*;
#(
  parameter int unsigned NBINS = 512
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     cfg_we,
  input  logic [$clog2(NBINS)-1:0] cfg_addr,
  input  bin_cfg_t                 cfg,
  input  logic                     pulse_start,
  input  logic                     in_valid,
  input  logic [4:0]               phase,
  output logic                     out_valid,
  output logic signed [15:0]       out_i,
  output logic signed [15:0]       out_q
);
  logic signed [15:0] si [NBINS+1];
  logic signed [15:0] sq [NBINS+1];
  assign si[0] = '0;
  assign sq[0] = '0;

  for (genvar j = 0; j < NBINS; j++) begin : g_bin
    // chain position j holds range bin r = NBINS-1-j
    logic [4:0] ei, eq;
    drfm_range_bin u_bin (
      .clk(clk), .rst(rst),
      .cfg_load(cfg_we && cfg_addr == ($clog2(NBINS))'(NBINS - 1 - j)),
      .cfg(cfg), .pulse_start(pulse_start),
      .in_valid(in_valid), .phase_in(phase),
      .sum_in_i(si[j]), .sum_in_q(sq[j]),
      .sum_out_i(si[j+1]), .sum_out_q(sq[j+1]),
      .exp_i(ei), .exp_q(eq)
    );
  end

  assign out_i = si[NBINS];
  assign out_q = sq[NBINS];

  // Output valid: from 4 clocks after a valid sample until its last
  // contribution (NBINS-1 clocks later) has left the chain. tail is loaded
  // in the same clock edge that makes the first contribution visible.
  logic [2:0]                 vd;
  logic [$clog2(NBINS+1)-1:0] tail;
  always_ff @(posedge clk) begin
    if (rst) begin
      vd   <= '0;
      tail <= '0;
    end else begin
      vd <= {vd[1:0], in_valid};
      if (vd[2])          tail <= ($clog2(NBINS+1))'(NBINS);
      else if (tail != 0) tail <= tail - 1'b1;
    end
  end
  assign out_valid = (tail != 0);
endmodule
