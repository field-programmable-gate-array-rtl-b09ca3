// Coherent integration: adds NMAPS consecutive range-Doppler maps point by
// point.
//
// The first map of a group is written into an accumulator memory of DEPTH
// complex words; for each following map the stored value of the same point is
// read, the new sample added and the sum written back. During the last map of
// the group the sum goes out instead (DataOut, sfix17_En36, saturated) and
// the next group starts over. The accumulator keeps 16 + clog2(NMAPS) bits so
// that no sum wraps internally.
//
// Timing: samples (DataIn/enb_in, sfix16_En36) may arrive in any pattern; the
// memory is read one point ahead, so the addition for each sample happens in
// the cycle it arrives and its output (for the last map) appears one clock
// later with enb_out. The accumulate-and-store behaviour follows the
// document; the read-ahead memory and the non-overlapping groups are this
// design's own choices.
module coherent_integration
  import radar_pkg::*;
#(
  parameter int unsigned DEPTH = 102 * 4096,  // points per map
  parameter int unsigned NMAPS = 4
) (
  input  logic clk,
  input  logic rst,
  input  logic enb_in,
  input  c16_t data_in,
  output logic enb_out,
  output c17_t data_out,
  output logic map_done   // pulses with the last point of each group
);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned MW = (NMAPS > 1) ? $clog2(NMAPS) : 1;
  localparam int unsigned SW = 16 + MW;

  typedef struct packed {
    logic signed [SW-1:0] re;
    logic signed [SW-1:0] im;
  } acc_t;

  acc_t          acc [DEPTH];
  acc_t          rd_q, sum;
  logic [AW-1:0] idx, idx_next;
  logic [MW-1:0] map;
  logic          first_map, last_map, last_pt;

  assign last_pt   = (idx == AW'(DEPTH - 1));
  assign idx_next  = last_pt ? '0 : idx + 1'b1;
  assign first_map = (map == '0);
  assign last_map  = (map == MW'(NMAPS - 1));

  always_comb begin
    sum.re = (first_map ? '0 : rd_q.re) + SW'(data_in.re);
    sum.im = (first_map ? '0 : rd_q.im) + SW'(data_in.im);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      idx <= '0;
      map <= '0;
    end else if (enb_in) begin
      idx <= idx_next;
      if (last_pt) map <= last_map ? '0 : map + 1'b1;
    end
  end

  // Read one point ahead; write back the running sum.
  always_ff @(posedge clk) begin
    rd_q <= acc[enb_in ? idx_next : idx];
    if (enb_in) acc[idx] <= sum;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      enb_out  <= 1'b0;
      map_done <= 1'b0;
    end else begin
      enb_out  <= enb_in && last_map;
      map_done <= enb_in && last_map && last_pt;
    end
    data_out.re <= sat17(64'(sum.re));
    data_out.im <= sat17(64'(sum.im));
  end
endmodule
