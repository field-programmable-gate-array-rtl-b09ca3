// Streaming FFT of 2^LOG2N points built from LOG2N radix-2 single-path
// delay-feedback stages (decimation in frequency), one sample per clock.
//
// Stage s has a feedback delay of N/2^(s+1) words and its own rotation CORDIC
// for the twiddle factors, so no twiddle ROM exists. Each stage adds one bit of
// growth, so the output is IN_W+LOG2N bits wide with no scaling: the binary
// point stays where it was at the input.
//
// Frames: input goes through a FIFO of one frame. The pipeline opens a frame
// only at a frame boundary and, inside a frame, stalls (all stages hold) while
// the FIFO is empty, so input may have gaps anywhere. After the last input
// the block keeps itself running for whole zero frames (at least the pipeline
// latency) so that the last frame comes out without waiting for more input;
// a valid bit travels with each sample, so the drain zeros never appear as
// output. A real frame arriving during a drain frame waits in the FIFO for
// the next boundary. The FIFO must not be asked to hold more than N samples.
//
// Output order is bit-reversed: out_bin gives the frequency index of each
// output sample. Latency from a frame's first input to its first output is
// N + LOG2N * (CORDIC_STAGES + 2) clock cycles (one FIFO cycle plus the
// LAT_TOTAL cycles of the stages) when the input is continuous. The document specifies only "FFT HDL Optimized" of the
// reference model; the R2SDF structure, the growth per stage and the
// bit-reversed output order are this design's own choices.
module fft_r2sdf #(
  parameter int unsigned LOG2N         = 12,
  parameter int unsigned IN_W          = 32,
  parameter int unsigned TW_W          = 18,
  parameter int unsigned CORDIC_STAGES = 16
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         in_valid,
  input  logic signed [IN_W-1:0]       in_re,
  input  logic signed [IN_W-1:0]       in_im,
  output logic                         out_valid,
  output logic [LOG2N-1:0]             out_bin,
  output logic signed [IN_W+LOG2N-1:0] out_re,
  output logic signed [IN_W+LOG2N-1:0] out_im
);
  localparam int unsigned N = 1 << LOG2N;

  function automatic int unsigned stage_lat(input int unsigned s);
    return (1 << (LOG2N - 1 - s)) + CORDIC_STAGES + 2;
  endfunction

  function automatic int unsigned lat_before(input int unsigned s);
    int unsigned acc = 0;
    for (int unsigned j = 0; j < s; j++) acc += stage_lat(j);
    return acc;
  endfunction

  localparam int unsigned LAT_TOTAL = lat_before(LOG2N);
  localparam int unsigned DRAIN     = ((LAT_TOTAL + N - 1) / N) * N;

  // Input FIFO of one frame. The pipeline takes a frame from it only at a
  // frame boundary; inside a frame it stalls (en low) when the FIFO runs dry.
  localparam int unsigned FW = 2 * IN_W;
  logic [FW-1:0]        fifo [N];
  logic [LOG2N-1:0]     f_wr, f_rd;
  logic [LOG2N:0]       f_cnt;
  logic                 f_empty, take, frame_real;
  logic [$clog2(DRAIN+1)-1:0] drain;
  logic [LOG2N-1:0]     in_pos;
  logic                 en;
  logic signed [IN_W-1:0] x_re, x_im;

  assign f_empty = (f_cnt == 0);
  // take a real sample: inside a real frame, or to open one at a boundary
  assign take = !f_empty && ((in_pos == 0) || frame_real);
  // run: a real sample, or a zero sample of a drain frame
  assign en   = take || ((in_pos == 0) ? (f_empty && drain != 0) : !frame_real);
  assign {x_re, x_im} = take ? fifo[f_rd] : '0;

  always_ff @(posedge clk) begin
    if (in_valid) fifo[f_wr] <= {in_re, in_im};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      f_wr       <= '0;
      f_rd       <= '0;
      f_cnt      <= '0;
      drain      <= '0;
      in_pos     <= '0;
      frame_real <= 1'b0;
    end else begin
      if (in_valid) f_wr <= f_wr + 1'b1;
      if (take)     f_rd <= f_rd + 1'b1;
      f_cnt <= f_cnt + (LOG2N+1)'(in_valid) - (LOG2N+1)'(take);
      if (take)            drain <= ($clog2(DRAIN+1))'(DRAIN);
      else if (en && drain != 0) drain <= drain - 1'b1;
      if (en) begin
        in_pos <= in_pos + 1'b1;
        if (in_pos == 0) frame_real <= take;
      end
    end
  end

  // Valid bit per sample through the whole pipeline.
  logic [LAT_TOTAL-1:0] vsr;
  logic                 fresh;
  always_ff @(posedge clk) begin
    if (rst) begin
      vsr   <= '0;
      fresh <= 1'b0;
    end else begin
      fresh <= en;
      if (en) vsr <= {vsr[LAT_TOTAL-2:0], take};
    end
  end

  for (genvar s = 0; s < LOG2N; s++) begin : g_st
    localparam int unsigned LOG2D = LOG2N - 1 - s;
    localparam int unsigned W     = IN_W + s;
    localparam int unsigned CNT0  = ((1 << (LOG2D + 1)) - (lat_before(s) % (1 << (LOG2D + 1))))
                                    % (1 << (LOG2D + 1));
    logic signed [W-1:0] i_re, i_im;
    logic signed [W:0]   o_re, o_im;
    if (s == 0) begin : g_in
      assign i_re = x_re;
      assign i_im = x_im;
    end else begin : g_chain
      assign i_re = g_st[s-1].o_re;
      assign i_im = g_st[s-1].o_im;
    end
    fft_stage #(
      .LOG2D(LOG2D), .IN_W(W), .TW_W(TW_W),
      .CORDIC_STAGES(CORDIC_STAGES), .CNT0(CNT0)
    ) u_stage (
      .clk(clk), .rst(rst), .en(en),
      .in_re(i_re), .in_im(i_im), .out_re(o_re), .out_im(o_im)
    );
  end

  assign out_re    = g_st[LOG2N-1].o_re;
  assign out_im    = g_st[LOG2N-1].o_im;
  assign out_valid = fresh && vsr[LAT_TOTAL-1];

  // Output position within the frame, bit-reversed into the frequency index.
  logic [LOG2N-1:0] out_pos;
  always_ff @(posedge clk) begin
    if (rst)            out_pos <= '0;
    else if (out_valid) out_pos <= out_pos + 1'b1;
  end
  always_comb
    for (int b = 0; b < LOG2N; b++) out_bin[b] = out_pos[LOG2N-1-b];

  // The FIFO holds one frame; input beyond that would be lost.
  always_ff @(posedge clk)
    if (!rst && in_valid) assert (f_cnt < (LOG2N+1)'(N) || take) else $error("fft_r2sdf: input FIFO overflow");
endmodule
