// Top level: the two FPGA signal processors side by side.
//
// Radar side: one RSNS-P4 modulus channel of the LPI CW radar receiver
// (three_stage_compression): range correlation, corner turn, windowed Doppler
// FFT and coherent integration of range-Doppler maps.
//
// Counter-radar side: a DRFM with an augmented image synthesizer. Digitized
// I/Q samples of an intercepted pulse are stored in a dual-ported memory under
// the memory controller, recalled after a programmable delay, converted to
// 5-bit phase samples by the I/Q phase converter and fed to the chain of range
// bin modulators, whose summed output goes to the DACs.
//
// The ADCs, DACs, mixers, filters and local oscillator are outside this
// logic: the top takes the digitized samples and delivers digital outputs. The
// control processor that writes the range bin coefficients reaches them
// through the cfg_* ports. Both sides share one clock and a synchronous,
// active-high reset. The two designs do not exchange data.
module radar_drfm_top
  import radar_pkg::*;
#(
  parameter int unsigned NC            = 102,
  parameter int unsigned NPER          = 4096,
  parameter int unsigned NMAPS         = 4,
  parameter int unsigned CORDIC_STAGES = 16,
  parameter int unsigned NBINS         = 512,
  parameter int unsigned MEM_DEPTH     = 4096
) (
  input  logic                         clk,
  input  logic                         rst,
  // radar receiver
  input  logic                         rc_coef_we,
  input  logic [$clog2(NC)-1:0]        rc_coef_addr,
  input  c16_t                         rc_coef_data,
  input  logic                         rx_valid,
  input  c16_t                         rx_data,
  output logic                         map_valid,
  output c17_t                         map_data,
  output logic [$clog2(NC)-1:0]        map_range,
  output logic [$clog2(NPER)-1:0]      map_doppler,
  output logic                         map_bank_swap,
  output logic                         map_done,
  // DRFM capture and recall
  input  logic                         adc_valid,
  input  iq8_t                         adc_iq,
  input  logic                         store_en,
  input  logic [$clog2(MEM_DEPTH)-1:0] store_addr,
  input  logic                         recall,
  input  logic [$clog2(MEM_DEPTH)-1:0] recall_addr,
  input  logic [$clog2(MEM_DEPTH):0]   recall_len,
  input  logic [15:0]                  recall_delay,
  // image synthesizer coefficients (control processor) and pulse timing
  input  logic                         cfg_we,
  input  logic [$clog2(NBINS)-1:0]     cfg_addr,
  input  bin_cfg_t                     cfg,
  input  logic                         pulse_start,
  // to the DACs
  output logic                         dac_valid,
  output logic signed [15:0]           dac_i,
  output logic signed [15:0]           dac_q
);
  three_stage_compression #(
    .NC(NC), .NPER(NPER), .NMAPS(NMAPS), .CORDIC_STAGES(CORDIC_STAGES)
  ) u_radar (
    .clk(clk), .rst(rst),
    .coef_we(rc_coef_we), .coef_addr(rc_coef_addr), .coef_data(rc_coef_data),
    .in_valid(rx_valid), .in_data(rx_data),
    .out_valid(map_valid), .out_data(map_data),
    .out_range(map_range), .out_doppler(map_doppler),
    .bank_swap(map_bank_swap), .map_done(map_done)
  );

  logic                         mem_we, mem_re, mem_vld;
  logic [$clog2(MEM_DEPTH)-1:0] mem_waddr, mem_raddr;
  iq8_t                         mem_rdata;

  drfm_mem_ctrl #(.DEPTH(MEM_DEPTH), .DELAY_W(16)) u_ctrl (
    .clk(clk), .rst(rst),
    .store_en(store_en && adc_valid), .store_addr(store_addr),
    .recall(recall), .recall_addr(recall_addr), .recall_len(recall_len),
    .delay(recall_delay),
    .we(mem_we), .waddr(mem_waddr), .re(mem_re), .raddr(mem_raddr),
    .out_valid(mem_vld)
  );

  drfm_dpram #(.DEPTH(MEM_DEPTH)) u_mem (
    .clk(clk), .we(mem_we), .waddr(mem_waddr), .wdata(adc_iq),
    .re(mem_re), .raddr(mem_raddr), .rdata(mem_rdata)
  );

  logic       ph_vld;
  logic [4:0] ph;
  iq_phase_converter #(.PHASE_W(5), .STAGES(12)) u_iqph (
    .clk(clk), .rst(rst), .in_valid(mem_vld), .iq(mem_rdata),
    .out_valid(ph_vld), .phase(ph)
  );

  dis_array #(.NBINS(NBINS)) u_dis (
    .clk(clk), .rst(rst),
    .cfg_we(cfg_we), .cfg_addr(cfg_addr), .cfg(cfg), .pulse_start(pulse_start),
    .in_valid(ph_vld), .phase(ph),
    .out_valid(dac_valid), .out_i(dac_i), .out_q(dac_q)
  );
endmodule
