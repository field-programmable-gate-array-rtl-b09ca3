// One radix-2 single-path delay-feedback (R2SDF) stage of the streaming FFT,
// decimation in frequency.
//
// A frame of 2*D samples passes through a D-word feedback delay line. During
// the first D samples the inputs are parked in the delay line while the
// differences left there by the previous frame are sent out, each multiplied
// by the twiddle factor W(2D)^k = exp(-j*2*pi*k/(2D)). During the second D
// samples the butterfly runs: the sum x[k] + x[k+D] goes out and the
// difference x[k] - x[k+D] goes into the delay line. The twiddle is computed
// on the fly by a rotation CORDIC from the sample counter, so no twiddle ROM
// is needed; the data path is delayed by the CORDIC latency to meet it.
//
// Widths grow by one bit per stage (IN_W -> IN_W+1). All registers advance
// only on en (one sample per enabled cycle); the stage latency is
// D + CORDIC_STAGES + 2 enabled cycles. CNT0 is the counter value at reset,
// which aligns the stage to the frame boundaries of the stream entering it.
module fft_stage #(
  parameter int unsigned LOG2D         = 3,   // D = 2^LOG2D, D >= 1
  parameter int unsigned IN_W          = 32,
  parameter int unsigned TW_W          = 18,  // twiddle: 1.0 = 2^(TW_W-2)
  parameter int unsigned CORDIC_STAGES = 16,
  parameter int unsigned CNT0          = 0
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   en,
  input  logic signed [IN_W-1:0] in_re,
  input  logic signed [IN_W-1:0] in_im,
  output logic signed [IN_W:0]   out_re,
  output logic signed [IN_W:0]   out_im
);
  localparam int unsigned D   = 1 << LOG2D;
  localparam int unsigned OW  = IN_W + 1;
  localparam int unsigned CL  = CORDIC_STAGES + 1;
  localparam int unsigned TWF = TW_W - 2;  // twiddle fraction bits

  logic [LOG2D:0] cnt;
  logic           second_half;
  assign second_half = cnt[LOG2D];

  // Feedback delay line of D complex words, kept as a circular buffer so it
  // maps onto RAM: the word read at the pointer was written D enables ago.
  localparam int unsigned PW = (LOG2D > 0) ? LOG2D : 1;
  logic [2*OW-1:0]      dl [D];
  logic [PW-1:0]        dl_ptr;
  logic signed [OW-1:0] pop_re, pop_im, push_re, push_im, bf_re, bf_im;
  logic signed [OW-1:0] x_re, x_im;

  assign x_re   = OW'(in_re);
  assign x_im   = OW'(in_im);
  assign {pop_re, pop_im} = dl[dl_ptr];

  always_comb begin
    if (second_half) begin
      bf_re   = pop_re + x_re;
      bf_im   = pop_im + x_im;
      push_re = pop_re - x_re;
      push_im = pop_im - x_im;
    end else begin
      bf_re   = pop_re;
      bf_im   = pop_im;
      push_re = x_re;
      push_im = x_im;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) cnt <= (LOG2D+1)'(CNT0);
    else if (en) cnt <= cnt + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst)     dl_ptr <= '0;
    else if (en) dl_ptr <= (dl_ptr == PW'(D - 1)) ? '0 : dl_ptr + 1'b1;
  end

  always_ff @(posedge clk)
    if (en) dl[dl_ptr] <= {push_re, push_im};

  // Twiddle angle -2*pi*k/(2D) for the difference outputs (first half).
  logic [31:0] tw_phase;
  assign tw_phase = second_half ? 32'd0
                  : 32'd0 - ((32'(cnt) & 32'(D - 1)) << (31 - LOG2D));

  logic signed [TW_W-1:0] tw_cos, tw_sin;
  cordic_rotate #(.OUT_W(TW_W), .STAGES(CORDIC_STAGES)) u_tw (
    .clk(clk), .en(en), .phase(tw_phase), .cos_o(tw_cos), .sin_o(tw_sin)
  );

  // Data path delayed to meet the CORDIC output.
  logic signed [OW-1:0] dd_re [CL];
  logic signed [OW-1:0] dd_im [CL];
  logic [CL-1:0]        dd_mul;
  always_ff @(posedge clk) begin
    if (en) begin
      dd_re[0] <= bf_re;
      dd_im[0] <= bf_im;
      dd_mul   <= {dd_mul[CL-2:0], ~second_half};
      for (int i = 1; i < CL; i++) begin
        dd_re[i] <= dd_re[i-1];
        dd_im[i] <= dd_im[i-1];
      end
    end
  end

  logic signed [OW+TW_W:0] pr, pi_;
  assign pr  = (OW+TW_W+1)'(dd_re[CL-1]) * (OW+TW_W+1)'(tw_cos)
             - (OW+TW_W+1)'(dd_im[CL-1]) * (OW+TW_W+1)'(tw_sin);
  assign pi_ = (OW+TW_W+1)'(dd_re[CL-1]) * (OW+TW_W+1)'(tw_sin)
             + (OW+TW_W+1)'(dd_im[CL-1]) * (OW+TW_W+1)'(tw_cos);

  always_ff @(posedge clk) begin
    if (en) begin
      if (dd_mul[CL-1]) begin
        out_re <= OW'(pr  >>> TWF);
        out_im <= OW'(pi_ >>> TWF);
      end else begin
        out_re <= dd_re[CL-1];
        out_im <= dd_im[CL-1];
      end
    end
  end
endmodule
