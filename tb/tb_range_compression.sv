// Checks the correlation receiver with 6 subcodes and 2 matched periods
// against a bit-exact integer model: random coefficients, random samples with
// random gaps in in_valid. Each output must equal
//   sat16( floor( sum_k sum_p sat16(floor(c[k]*x[n-k-6p] / 2^15)) / 2^6 ) )
// and must appear three clocks after its input sample.
`include "tb_common.svh"
module tb_range_compression;
  import radar_pkg::*;
  `TB_COUNTERS
  localparam int NC = 6, NPI = 2;
  logic clk, rst, coef_we, in_valid, out_valid;
  logic [$clog2(NC)-1:0] coef_addr;
  c16_t coef_data, in_data, out_data;
  `TB_CLOCK(clk)
  `TB_WATCHDOG(clk, 20000)

  range_compression #(.NC(NC), .NPI(NPI)) dut (
    .clk(clk), .rst(rst), .coef_we(coef_we), .coef_addr(coef_addr), .coef_data(coef_data),
    .in_valid(in_valid), .in_data(in_data), .out_valid(out_valid), .out_data(out_data));

  longint cr [NC], ci [NC];
  longint hr [$], hi [$];   // input history, newest first
  c16_t   exp_q [$];
  logic [2:0] vpipe = '0;

  function automatic longint s16(input longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  function automatic longint fdiv(input longint v, input int sh);
    return v >>> sh;   // floor division by 2^sh
  endfunction

  always @(posedge clk) begin
    if (rst) vpipe <= '0;
    else vpipe <= {vpipe[1:0], in_valid};
    if (!rst && in_valid) begin
      longint sr, si;
      c16_t e;
      hr.push_front(longint'(in_data.re));
      hi.push_front(longint'(in_data.im));
      sr = 0; si = 0;
      for (int k = 0; k < NC; k++)
        for (int p = 0; p < NPI; p++) begin
          longint xr, xi;
          int idx;
          idx = k + p * NC;
          xr = (idx < hr.size()) ? hr[idx] : 0;
          xi = (idx < hi.size()) ? hi[idx] : 0;
          sr += s16(fdiv(xr * cr[k] - xi * ci[k], 15));
          si += s16(fdiv(xr * ci[k] + xi * cr[k], 15));
        end
      e.re = 16'(s16(fdiv(sr, 6)));
      e.im = 16'(s16(fdiv(si, 6)));
      exp_q.push_back(e);
    end
    `CHECK(out_valid == vpipe[2], ("out_valid %0b, expected %0b", out_valid, vpipe[2]))
    if (out_valid) begin
      c16_t e;
      e = exp_q.pop_front();
      `CHECK(out_data == e, ("got (%0d,%0d) expected (%0d,%0d)", int'(out_data.re), int'(out_data.im), int'(e.re), int'(e.im)))
    end
  end

  initial begin
    rst = 1'b1; coef_we = 1'b0; coef_addr = '0; coef_data = '0; in_valid = 1'b0; in_data = '0;
    repeat (2) @(negedge clk);
    for (int k = 0; k < NC; k++) begin
      cr[k] = $urandom_range(0, 65535) - 32768;
      ci[k] = $urandom_range(0, 65535) - 32768;
      coef_we = 1'b1; coef_addr = ($clog2(NC))'(k);
      coef_data.re = 16'(cr[k]); coef_data.im = 16'(ci[k]);
      @(negedge clk);
    end
    coef_we = 1'b0;
    rst = 1'b0;
    for (int n = 0; n < 3000; n++) begin
      in_valid = 1'($urandom_range(0, 3) != 0);
      // mostly small samples, sometimes full scale to reach saturation
      if (n % 50 < 5) begin
        in_data.re = 16'($urandom_range(0, 65535));
        in_data.im = 16'($urandom_range(0, 65535));
      end else begin
        in_data.re = 16'($urandom_range(0, 4000) - 2000);
        in_data.im = 16'($urandom_range(0, 4000) - 2000);
      end
      @(negedge clk);
    end
    in_valid = 1'b0;
    repeat (5) @(negedge clk);
    `CHECK(exp_q.size() == 0, ("%0d outputs missing", exp_q.size()))
    `TB_FINISH
  end
endmodule
