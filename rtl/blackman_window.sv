// Blackman window generator for the Doppler filter.
//
// For sample n of an N-point frame it produces
//   w[n] = 0.42 - 0.5*cos(2*pi*n/(N-1)) + 0.08*cos(4*pi*n/(N-1))
// as sfix16_En15. With c = cos(2*pi*n/(N-1)) the double-angle identity turns
// this into w = 0.34 - 0.5*c + 0.16*c^2, so one rotation CORDIC (fed by a
// phase accumulator stepping 2^32/(N-1) per sample) and one squarer suffice;
// no window ROM is stored. The result is saturated to 32767 at the centre.
//
// Interface: each cycle with en high advances to the next sample of the frame
// (the frame restarts after N samples). The pipeline itself runs every clock:
// w for the sample enabled at cycle t is on w_o LATENCY = CORDIC_STAGES + 2
// clock cycles later, whatever en does in between. The document
// names a Blackman window; the generator structure is this design's own.
module blackman_window
  import radar_pkg::*;
#(
  parameter int unsigned N             = 4096,
  parameter int unsigned CORDIC_STAGES = 16
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               en,
  output logic signed [15:0] w_o
);
  localparam logic [31:0]   PH_INC  = 32'(((64'd1 << 32) + 64'(N - 1) / 2) / 64'(N - 1));
  localparam logic signed [63:0] K034  = 64'sd11141;  // round(0.34 * 2^15)
  localparam logic signed [63:0] K016  = 64'sd10486;  // round(0.16 * 2^16)

  logic [$clog2(N)-1:0] n;
  logic [31:0]          ph;  // phase of the sample enabled this cycle

  always_ff @(posedge clk) begin
    if (rst) begin
      n  <= '0;
      ph <= '0;
    end else if (en) begin
      if (n == $clog2(N)'(N - 1)) begin
        n  <= '0;
        ph <= '0;
      end else begin
        n  <= n + 1'b1;
        ph <= ph + PH_INC;
      end
    end
  end

  // cos with 1.0 = 2^16
  logic signed [17:0] c;
  logic signed [17:0] c_unused_sin;
  cordic_rotate #(.OUT_W(18), .STAGES(CORDIC_STAGES)) u_cos (
    .clk(clk), .en(1'b1), .phase(ph), .cos_o(c), .sin_o(c_unused_sin)
  );

  // w*2^15 = 0.34*2^15 - c/4 + 0.16*c^2/2^17
  logic signed [63:0] c2, wv;
  assign c2 = 64'(c) * 64'(c);
  assign wv = K034 - (64'(c) >>> 2) + ((c2 * K016) >>> 33);

  always_ff @(posedge clk) begin
    if (rst) w_o <= '0;
    else     w_o <= sat16(wv);
  end
endmodule
