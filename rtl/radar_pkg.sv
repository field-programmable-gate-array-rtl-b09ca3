// Shared types, sizes and constants for the RSNS-P4 three-stage compression
// receiver and the DRFM digital image synthesizer.
//
// Complex samples travel between blocks as packed structs of signed real and
// imaginary parts. The word widths are the fixed-point types of the reference
// model (sfix16 for most stages, sfix17 after integration, 5-bit phase and
// 8-bit I/Q in the DRFM); the binary-point positions are carried in the
// comments of each block, not in the types. The CORDIC arctangent table is
// shared by the rotation and vectoring CORDICs: entry i is
// round(atan(2^-i) / (2*pi) * 2^32), i.e. the angle in units of 2^-32 turns.
package radar_pkg;

  // sfix16 complex sample (range compression output, storage, Doppler output)
  typedef struct packed {
    logic signed [15:0] re;
    logic signed [15:0] im;
  } c16_t;

  // sfix17 complex sample (coherent integration output)
  typedef struct packed {
    logic signed [16:0] re;
    logic signed [16:0] im;
  } c17_t;

  // 8-bit I/Q sample from the DRFM ADCs
  typedef struct packed {
    logic signed [7:0] i;
    logic signed [7:0] q;
  } iq8_t;

  // Per-range-bin coefficients written by the DRFM control processor
  typedef struct packed {
    logic [4:0] phase;      // preload of the phase register
    logic [4:0] phase_inc;  // added to the phase register at every pulse
    logic [3:0] gain;       // preload of the gain exponent g (gain = 2^g)
    logic [3:0] gain_inc;   // added to the gain exponent at every pulse
  } bin_cfg_t;

  localparam int unsigned NC_DEFAULT    = 102;   // subcodes per code period
  localparam int unsigned NPER_DEFAULT  = 4096;  // code periods per map
  localparam int unsigned NMAPS_DEFAULT = 4;     // maps integrated coherently
  localparam int unsigned GAIN_MAX      = 10;    // 8-bit LUT << 10 = 18 bits

  localparam int unsigned CORDIC_MAX = 24;
  localparam logic [31:0] ATAN_TAB [CORDIC_MAX] = '{
    32'd536870912, 32'd316933406, 32'd167458907, 32'd85004756,
    32'd42667331,  32'd21354465,  32'd10679838,  32'd5340245,
    32'd2670163,   32'd1335087,   32'd667544,    32'd333772,
    32'd166886,    32'd83443,     32'd41722,     32'd20861,
    32'd10430,     32'd5215,      32'd2608,      32'd1304,
    32'd652,       32'd326,       32'd163,       32'd81
  };

  // Saturate a wide signed value to a narrower signed width.
  function automatic logic signed [15:0] sat16(input logic signed [63:0] v);
    if (v > 64'sd32767)       return 16'sh7fff;
    else if (v < -64'sd32768) return 16'sh8000;
    else                      return v[15:0];
  endfunction

  function automatic logic signed [16:0] sat17(input logic signed [63:0] v);
    if (v > 64'sd65535)       return 17'sh0ffff;
    else if (v < -64'sd65536) return 17'sh10000;
    else                      return v[16:0];
  endfunction

endpackage
