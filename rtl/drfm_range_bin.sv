// One complex range bin modulator of the DRFM digital image synthesizer.
//
// For every 5-bit phase sample of the intercepted pulse the bin adds its own
// phase rotation, looks up the unit phasor, scales it by a power-of-two gain
// and adds the result to the running sum coming from the previous range bin:
//   out = prev + 2^g * exp(j*(phi_in + phi_bin))
// The phase register is preloaded by the control processor and advanced by
// the phase increment at every pulse (the bin's Doppler profile); the gain
// exponent is preloaded and advanced by the gain increment at every pulse,
// clamped at GAIN_MAX (the radar cross-section profile).
//
// Pipeline (one sample per clock, every stage registered):
//   1. phase adder: phase_in + phase register, modulo 32
//   2. I/Q look-up table: 8-bit round(127*cos), round(127*sin) of 2*pi*p/32
//   3. gain: 8-bit value << g, an 18-bit product
//   4. bit extraction: the 5 low bits go to the expansion outputs, the high
//      13 bits, sign-extended to 16, are added to the previous bin's sum
// The sum register is the one-sample range bin delay: bins chained through
// sum_in/sum_out delay each other's contributions by one clock per bin.
// sum_in must be the output of the previous bin's stage 4 register for the
// same pulse sample stream; the first bin of a chain gets zero.
//
// Interface: cfg_load writes cfg (preload values and increments); pulse_start
// advances the phase and gain registers once per pulse; the increments take
// effect from the next sample. Widths (5-bit phase, 8-bit I/Q, 18-bit
// product, 13 + 3 bits, 16-bit sums) follow the document; the sign extension of
// the 13-bit field (the document pads three zero bits), the low five bits as
// the expansion field and the gain clamp are this design's reading.
module drfm_range_bin
  import radar_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic               cfg_load,
  input  bin_cfg_t           cfg,
  input  logic               pulse_start,
  input  logic               in_valid,
  input  logic [4:0]         phase_in,
  input  logic signed [15:0] sum_in_i,
  input  logic signed [15:0] sum_in_q,
  output logic signed [15:0] sum_out_i,
  output logic signed [15:0] sum_out_q,
  output logic [4:0]         exp_i,     // reserved for future expansion
  output logic [4:0]         exp_q
);
  // Quarter wave of round(127*cos(2*pi*k/32)), k = 0..8.
  function automatic logic signed [7:0] qcos(input logic [3:0] k);
    case (k)
      4'd0: return 8'sd127;
      4'd1: return 8'sd125;
      4'd2: return 8'sd117;
      4'd3: return 8'sd106;
      4'd4: return 8'sd90;
      4'd5: return 8'sd71;
      4'd6: return 8'sd49;
      4'd7: return 8'sd25;
      default: return 8'sd0;
    endcase
  endfunction

  function automatic logic signed [7:0] lut_cos(input logic [4:0] p);
    logic [4:0] a;
    a = (p > 5'd16) ? 5'd0 - p : p;          // cos is even: fold to 0..16
    return (a > 5'd8) ? -qcos(4'(5'd16 - a)) : qcos(a[3:0]);
  endfunction

  function automatic logic signed [7:0] lut_sin(input logic [4:0] p);
    return lut_cos(p - 5'd8);                // sin(x) = cos(x - pi/2)
  endfunction

  logic [4:0] ph_reg, ph_inc;
  logic [3:0] g_reg, g_inc;

  always_ff @(posedge clk) begin
    if (rst) begin
      ph_reg <= '0;
      ph_inc <= '0;
      g_reg  <= '0;
      g_inc  <= '0;
    end else if (cfg_load) begin
      ph_reg <= cfg.phase;
      ph_inc <= cfg.phase_inc;
      g_reg  <= (cfg.gain > 4'(GAIN_MAX)) ? 4'(GAIN_MAX) : cfg.gain;
      g_inc  <= cfg.gain_inc;
    end else if (pulse_start) begin
      ph_reg <= ph_reg + ph_inc;
      g_reg  <= (5'(g_reg) + 5'(g_inc) > 5'(GAIN_MAX)) ? 4'(GAIN_MAX) : g_reg + g_inc;
    end
  end

  // Stage 1: phase adder
  logic [4:0] p1;
  logic [3:0] g1;
  logic       v1;
  // Stage 2: I/Q look-up
  logic signed [7:0] i2, q2;
  logic [3:0]        g2;
  logic              v2;
  // Stage 3: gain
  logic signed [17:0] i3, q3;
  logic               v3;

  always_ff @(posedge clk) begin
    if (rst) begin
      v1 <= 1'b0;
      v2 <= 1'b0;
      v3 <= 1'b0;
    end else begin
      v1 <= in_valid;
      v2 <= v1;
      v3 <= v2;
    end
    p1 <= phase_in + ph_reg;
    g1 <= g_reg;
    i2 <= lut_cos(p1);
    q2 <= lut_sin(p1);
    g2 <= g1;
    i3 <= 18'(i2) <<< g2;
    q3 <= 18'(q2) <<< g2;
  end

  // Stage 4: bit extraction, sign extension and the chain adder
  always_ff @(posedge clk) begin
    if (rst) begin
      sum_out_i <= '0;
      sum_out_q <= '0;
      exp_i     <= '0;
      exp_q     <= '0;
    end else begin
      sum_out_i <= sum_in_i + (v3 ? 16'(signed'(i3[17:5])) : 16'sd0);
      sum_out_q <= sum_in_q + (v3 ? 16'(signed'(q3[17:5])) : 16'sd0);
      exp_i     <= i3[4:0];
      exp_q     <= q3[4:0];
    end
  end
endmodule
