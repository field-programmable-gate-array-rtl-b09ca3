// I/Q phase converter of the DRFM: turns each stored I/Q sample into the
// 5-bit phase sample that drives the digital image synthesizer.
//
// A pipelined CORDIC in vectoring mode rotates the vector (I, Q) onto the
// positive real axis while accumulating the rotation angle, which is atan2(Q, I)
// as a fraction of a full turn. The first register folds the left half-plane
// into the right one by a 180-degree rotation. The angle is rounded to
// PHASE_W bits (32 phase states of 11.25 degrees for the default 5 bits).
//
// Interface: iq/in_valid in; phase/out_valid out, LATENCY = STAGES + 2 clock
// cycles later, one sample per clock. The document gives the block's purpose
// (an I/Q phase converter supplying 5-bit phase from a CORDIC); the vectoring
// CORDIC, its 12 iterations and the rounding are this design's own choices.
// Lint reports the low bits of the rounded angle as unused: only its top
// PHASE_W bits form the phase sample, by design.
module iq_phase_converter
  import radar_pkg::*;
#(
  parameter int unsigned PHASE_W = 5,
  parameter int unsigned STAGES  = 12
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               in_valid,
  input  iq8_t               iq,
  output logic               out_valid,
  output logic [PHASE_W-1:0] phase
);
  localparam int unsigned IW = 18;  // 8-bit input << 8, plus CORDIC growth

  logic signed [IW-1:0] x [STAGES+1];
  logic signed [IW-1:0] y [STAGES+1];
  logic [31:0]          z [STAGES+1];
  logic [STAGES+1:0]    vld;

  logic signed [IW-1:0] xi, yq;
  assign xi = IW'(iq.i) <<< 8;
  assign yq = IW'(iq.q) <<< 8;

  always_ff @(posedge clk) begin
    if (xi < 0) begin
      x[0] <= -xi;
      y[0] <= -yq;
      z[0] <= 32'h8000_0000;
    end else begin
      x[0] <= xi;
      y[0] <= yq;
      z[0] <= '0;
    end
  end

  for (genvar i = 0; i < STAGES; i++) begin : g_stage
    always_ff @(posedge clk) begin
      if (y[i] >= 0) begin
        x[i+1] <= x[i] + (y[i] >>> i);
        y[i+1] <= y[i] - (x[i] >>> i);
        z[i+1] <= z[i] + ATAN_TAB[i];
      end else begin
        x[i+1] <= x[i] - (y[i] >>> i);
        y[i+1] <= y[i] + (x[i] >>> i);
        z[i+1] <= z[i] - ATAN_TAB[i];
      end
    end
  end

  logic [31:0] z_round;
  assign z_round = z[STAGES] + (32'd1 << (31 - PHASE_W));

  always_ff @(posedge clk) begin
    if (rst) vld <= '0;
    else     vld <= {vld[STAGES:0], in_valid};
    phase <= z_round[31 -: PHASE_W];
  end
  assign out_valid = vld[STAGES+1];
endmodule
