// Range compression: a coherent correlation receiver over NPI matched code
// periods (default 2) of an NC-subcode RSNS-P4 code (default 102).
//
// Each received complex sample (sfix16_En40) enters a tapped delay line of
// NPI*NC samples. Every tap k of every period is multiplied by the
// coefficient c[k] (sfix16_En15), the complex-conjugate reference; each
// product is requantized to sfix16_En40 (15 fraction bits dropped, floor,
// saturated). The product of the later period plus that of the earlier period,
// NC samples older, gives an sfix17_En40 value per tap; the sum over the NC
// taps is requantized to sfix16_En34 (6 bits dropped, floor, saturated):
//   y[n] = sum_k sum_p Q(c[k] * x[n - k - p*NC])
// Adding the product NC samples older is the same as the z^-NC delay of the
// product vector in the reference model; here it is formed from the longer
// delay line instead of storing NC past product vectors.
//
// Interface: coefficients are written one at a time through coef_we /
// coef_addr / coef_data (the reference is a constant in the model; a write
// port lets each modulus load its own code). A sample with in_valid shifts the
// delay line; its correlation appears on out_data with out_valid three clock
// cycles later (delay line, products, sum). Products and the sum are registered stages that run every
// clock. Synchronous reset clears the delay line.
module range_compression
  import radar_pkg::*;
#(
  parameter int unsigned NC  = 102,  // subcodes per code period
  parameter int unsigned NPI = 2     // matched periods (N in N*T)
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  coef_we,
  input  logic [$clog2(NC)-1:0] coef_addr,
  input  c16_t                  coef_data,
  input  logic                  in_valid,
  input  c16_t                  in_data,
  output logic                  out_valid,
  output c16_t                  out_data
);
  localparam int unsigned TAPS = NPI * NC;
  localparam int unsigned SW   = 17 + $clog2(NC) + 1;  // sum width

  c16_t coef [NC];
  c16_t taps [TAPS];

  always_ff @(posedge clk) begin
    if (coef_we) coef[coef_addr] <= coef_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < TAPS; i++) taps[i] <= '0;
    end else if (in_valid) begin
      taps[0] <= in_data;
      for (int i = 1; i < TAPS; i++) taps[i] <= taps[i-1];
    end
  end

  // Per-tap products, requantized to sfix16_En40, summed over the periods.
  function automatic c16_t cmul_q(input c16_t a, input c16_t b);
    logic signed [63:0] re, im;
    re = 64'(a.re) * 64'(b.re) - 64'(a.im) * 64'(b.im);
    im = 64'(a.re) * 64'(b.im) + 64'(a.im) * 64'(b.re);
    cmul_q.re = sat16(re >>> 15);
    cmul_q.im = sat16(im >>> 15);
  endfunction

  logic signed [16:0] tap_re [NC];
  logic signed [16:0] tap_im [NC];
  logic               v1, v2;

  always_ff @(posedge clk) begin
    for (int k = 0; k < NC; k++) begin
      logic signed [16:0] sr, si;
      c16_t p;
      sr = '0;
      si = '0;
      for (int q = 0; q < NPI; q++) begin
        p  = cmul_q(taps[k + q*NC], coef[k]);
        sr = sr + 17'(p.re);
        si = si + 17'(p.im);
      end
      tap_re[k] <= sr;
      tap_im[k] <= si;
    end
  end

  logic signed [SW-1:0] acc_re, acc_im;
  always_comb begin
    acc_re = '0;
    acc_im = '0;
    for (int k = 0; k < NC; k++) begin
      acc_re = acc_re + SW'(tap_re[k]);
      acc_im = acc_im + SW'(tap_im[k]);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      v1        <= 1'b0;
      v2        <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v1        <= in_valid;
      v2        <= v1;
      out_valid <= v2;
    end
    out_data.re <= sat16(64'(acc_re >>> 6));
    out_data.im <= sat16(64'(acc_im >>> 6));
  end
endmodule
