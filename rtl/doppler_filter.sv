// Doppler filter: Blackman window, streaming FFT over the code periods of each
// range bin, and conversion back to a 16-bit word.
//
// The input is the corner-turned stream from the data storage: for every
// range bin, NPER consecutive sfix16_En34 samples (one per code period). Each
// sample is multiplied by the Blackman coefficient of its position (sfix16_En15)
// giving a full-precision sfix32_En49 product, which enters a 2^LOG2N-point
// FFT whose output keeps all its growth, sfix(32+LOG2N)_En49. The document's
// FFT output type is sfix35_En49, i.e. only 3 bits of growth, so this design
// first scales the full-growth result down by 2^(LOG2N-3) to reach that
// type, then applies the document's "convert" to sfix16_En36 (13 fraction
// bits dropped, floor) with saturation: a right shift of 13 + LOG2N - 3 in
// all (22 at LOG2N = 12, 13 at LOG2N = 3). Where the growth is removed is
// this design's choice; the document does not say.
//
// Timing: the window generator steps its sample counter on enb_in and its
// pipeline runs every clock, so the data (with its enable) is delayed by the
// window latency before the multiply. Frames must arrive back to back
// (gaps only between frames). Output samples come in bit-reversed frequency
// order; out_bin gives each one's Doppler bin. The structure (window, multiply,
// FFT, convert) and the word types follow the document's Doppler filter model;
// the FFT architecture and the order of its output are this design's choices.
module doppler_filter
  import radar_pkg::*;
#(
  parameter int unsigned LOG2N         = 12,
  parameter int unsigned CORDIC_STAGES = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             enb_in,
  input  c16_t             data_in,
  output logic             enb_out,
  output logic [LOG2N-1:0] out_bin,
  output c16_t             data_out
);
  localparam int unsigned N     = 1 << LOG2N;
  localparam int unsigned WLAT  = CORDIC_STAGES + 2;
  localparam int unsigned FW    = 32 + LOG2N;

  logic signed [15:0] w;
  blackman_window #(.N(N), .CORDIC_STAGES(CORDIC_STAGES)) u_win (
    .clk(clk), .rst(rst), .en(enb_in), .w_o(w)
  );

  // Delay the data and its enable by the window latency.
  c16_t            dd [WLAT];
  logic [WLAT-1:0] dv;
  always_ff @(posedge clk) begin
    if (rst) dv <= '0;
    else     dv <= {dv[WLAT-2:0], enb_in};
    dd[0] <= data_in;
    for (int i = 1; i < WLAT; i++) dd[i] <= dd[i-1];
  end

  // Windowed product: sfix16_En34 * sfix16_En15 = sfix32_En49
  logic signed [31:0] p_re, p_im;
  logic               p_vld;
  always_ff @(posedge clk) begin
    if (rst) p_vld <= 1'b0;
    else     p_vld <= dv[WLAT-1];
    p_re <= 32'(dd[WLAT-1].re) * 32'(w);
    p_im <= 32'(dd[WLAT-1].im) * 32'(w);
  end

  logic                 f_vld;
  logic [LOG2N-1:0]     f_bin;
  logic signed [FW-1:0] f_re, f_im;
  fft_r2sdf #(.LOG2N(LOG2N), .IN_W(32), .TW_W(18), .CORDIC_STAGES(CORDIC_STAGES)) u_fft (
    .clk(clk), .rst(rst), .in_valid(p_vld), .in_re(p_re), .in_im(p_im),
    .out_valid(f_vld), .out_bin(f_bin), .out_re(f_re), .out_im(f_im)
  );

  // convert: sfix(FW)_En49 -> sfix35_En49 -> sfix16_En36
  localparam int unsigned CONV_SHIFT = 13 + LOG2N - 3;
  always_ff @(posedge clk) begin
    if (rst) enb_out <= 1'b0;
    else     enb_out <= f_vld;
    out_bin     <= f_bin;
    data_out.re <= sat16(64'(f_re >>> CONV_SHIFT));
    data_out.im <= sat16(64'(f_im >>> CONV_SHIFT));
  end
endmodule
