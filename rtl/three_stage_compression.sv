// RSNS-P4 three-stage compression for one modulus of an LPI CW radar
// receiver: range compression, corner turn, Doppler filtering and coherent
// integration in series.
//
// Digitized received samples (sfix16_En40) are correlated against the code of
// this modulus over two code periods, giving NC range bins per code period
// (sfix16_En34). The data storage collects NPER code periods and replays each
// range bin's NPER values as one sequence; the Doppler filter windows and
// Fourier-transforms each sequence into NPER Doppler bins (sfix16_En36, in
// bit-reversed order); the coherent integrator sums NMAPS whole range-Doppler
// maps point by point (sfix17_En36). An enable travels with the data between
// the stages, as in the reference model, so every stage runs only on valid
// samples.
//
// Interface: coefficient write port of the range correlator; in_valid/in_data
// in; out_valid/out_data out with out_range (range bin) and out_doppler
// (Doppler bin, natural order) for each output point. Status pulses report
// bank swaps of the storage and completed integrations. The stage order,
// word types and sizes follow the document; a radar uses one such channel per
// RSNS modulus (three in the document's example).
module three_stage_compression
  import radar_pkg::*;
#(
  parameter int unsigned NC            = 102,
  parameter int unsigned NPER          = 4096,
  parameter int unsigned NMAPS         = 4,
  parameter int unsigned CORDIC_STAGES = 16
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    coef_we,
  input  logic [$clog2(NC)-1:0]   coef_addr,
  input  c16_t                    coef_data,
  input  logic                    in_valid,
  input  c16_t                    in_data,
  output logic                    out_valid,
  output c17_t                    out_data,
  output logic [$clog2(NC)-1:0]   out_range,
  output logic [$clog2(NPER)-1:0] out_doppler,
  output logic                    bank_swap,
  output logic                    map_done
);
  localparam int unsigned LOG2N = $clog2(NPER);

  logic rc_vld, ds_vld, df_vld;
  c16_t rc_data, ds_data, df_data;
  logic [LOG2N-1:0] df_bin;

  range_compression #(.NC(NC), .NPI(2)) u_rc (
    .clk(clk), .rst(rst),
    .coef_we(coef_we), .coef_addr(coef_addr), .coef_data(coef_data),
    .in_valid(in_valid), .in_data(in_data),
    .out_valid(rc_vld), .out_data(rc_data)
  );

  data_storage #(.NC(NC), .NPER(NPER)) u_ds (
    .clk(clk), .rst(rst),
    .enb_in(rc_vld), .store_in(rc_data),
    .enb_out(ds_vld), .store_out(ds_data), .bank_swap(bank_swap)
  );

  doppler_filter #(.LOG2N(LOG2N), .CORDIC_STAGES(CORDIC_STAGES)) u_df (
    .clk(clk), .rst(rst),
    .enb_in(ds_vld), .data_in(ds_data),
    .enb_out(df_vld), .out_bin(df_bin), .data_out(df_data)
  );

  coherent_integration #(.DEPTH(NC * NPER), .NMAPS(NMAPS)) u_ci (
    .clk(clk), .rst(rst),
    .enb_in(df_vld), .data_in(df_data),
    .enb_out(out_valid), .data_out(out_data), .map_done(map_done)
  );

  // Range and Doppler index of each output point: the Doppler filter output
  // comes range bin by range bin, NPER points each.
  logic [$clog2(NC)-1:0] rng_cnt;
  logic [LOG2N-1:0]      pos_cnt, bin_q;
  always_ff @(posedge clk) begin
    if (rst) begin
      rng_cnt <= '0;
      pos_cnt <= '0;
    end else if (df_vld) begin
      pos_cnt <= pos_cnt + 1'b1;
      if (pos_cnt == LOG2N'(NPER - 1))
        rng_cnt <= (rng_cnt == ($clog2(NC))'(NC - 1)) ? '0 : rng_cnt + 1'b1;
    end
    out_range <= rng_cnt;
    bin_q     <= df_bin;
  end
  assign out_doppler = bin_q;

  initial assert (NPER == (1 << LOG2N)) else $fatal(1, "NPER must be a power of two");
endmodule
