// Pipelined CORDIC in rotation mode: produces cos and sin of a phase word.
//
// The phase is an unsigned fraction of a full turn (2^32 = 360 degrees). The
// first register folds the angle into [-90, +90] degrees by a 180-degree
// rotation of the start vector; STAGES micro-rotations by atan(2^-i) then drive
// the residual angle to zero. The start vector is pre-scaled by the CORDIC gain
// 1/K = 0.607253, so the outputs are cos and sin with amplitude
// 2^(OUT_W-2) (an 18-bit output therefore means 1.0 = 65536). The datapath
// carries four guard bits below the output LSB, rounded away at the end.
//
// Timing: all registers advance only when en is high; a phase presented with
// en appears on cos_o/sin_o after STAGES+1 enabled cycles (LATENCY).
// Used for the FFT twiddle factors and the Blackman window cosine. The
// document names a CORDIC only as the phase source of the DRFM; this rotation
// variant and its sizes are this design's own choice. Lint reports the top
// bits of the last x/y stage as unused: they hold only the growth headroom
// of the intermediate stages, and the outputs are taken below them.
module cordic_rotate
  import radar_pkg::*;
#(
  parameter int unsigned OUT_W  = 18,
  parameter int unsigned STAGES = 16
) (
  input  logic                    clk,
  input  logic                    en,
  input  logic [31:0]             phase,
  output logic signed [OUT_W-1:0] cos_o,
  output logic signed [OUT_W-1:0] sin_o
);
  localparam int unsigned GUARD = 4;                 // extra fraction bits
  localparam int unsigned IW = OUT_W + 2 + GUARD;
  localparam int unsigned LATENCY = STAGES + 1;
  localparam logic signed [IW-1:0] X0 = IW'(int'(0.6072529350088813 * (2.0 ** (OUT_W - 2 + GUARD))));

  logic signed [IW-1:0] x [STAGES+1];
  logic signed [IW-1:0] y [STAGES+1];
  logic signed [31:0]   z [STAGES+1];

  // Stage 0: quadrant folding.
  always_ff @(posedge clk) begin
    if (en) begin
      if (phase[31] ^ phase[30]) begin
        // angle in (90, 270) degrees: start from -X0 and rotate by angle-180
        x[0] <= -X0;
        z[0] <= signed'(phase - 32'h8000_0000);
      end else begin
        x[0] <= X0;
        z[0] <= signed'(phase);
      end
      y[0] <= '0;
    end
  end

  for (genvar i = 0; i < STAGES; i++) begin : g_stage
    always_ff @(posedge clk) begin
      if (en) begin
        if (z[i] >= 0) begin
          x[i+1] <= x[i] - (y[i] >>> i);
          y[i+1] <= y[i] + (x[i] >>> i);
          z[i+1] <= z[i] - signed'(ATAN_TAB[i]);
        end else begin
          x[i+1] <= x[i] + (y[i] >>> i);
          y[i+1] <= y[i] - (x[i] >>> i);
          z[i+1] <= z[i] + signed'(ATAN_TAB[i]);
        end
      end
    end
  end

  // Round away the guard bits.
  logic signed [IW-1:0] xr, yr;
  assign xr = (x[STAGES] + IW'(1 << (GUARD - 1))) >>> GUARD;
  assign yr = (y[STAGES] + IW'(1 << (GUARD - 1))) >>> GUARD;
  assign cos_o = xr[OUT_W-1:0];
  assign sin_o = yr[OUT_W-1:0];

  initial assert (STAGES <= CORDIC_MAX && LATENCY == STAGES + 1);
endmodule
