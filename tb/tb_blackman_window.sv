// Checks the Blackman window generator for a 64-point frame over two frames
// with random gaps in the enable: each coefficient must equal
// 0.42 - 0.5cos(2*pi*n/63) + 0.08cos(4*pi*n/63) in Q15 within 3 LSB, and it
// must appear CORDIC_STAGES+2 clocks after the enable of its sample.
`include "tb_common.svh"
module tb_blackman_window;
  `TB_COUNTERS
  localparam int N = 64, CS = 16, LAT = CS + 2;
  localparam real PI = 3.14159265358979323846;
  logic clk, rst, en;
  logic signed [15:0] w;
  `TB_CLOCK(clk)
  `TB_WATCHDOG(clk, 20000)

  blackman_window #(.N(N), .CORDIC_STAGES(CS)) dut (.clk(clk), .rst(rst), .en(en), .w_o(w));

  logic [LAT-1:0] vsr;
  int nsr [LAT];
  int n = 0;
  int ncoef = 0;
  always @(posedge clk) begin
    if (rst) vsr <= '0;
    else begin
      vsr <= {vsr[LAT-2:0], en};
      for (int i = LAT - 1; i > 0; i--) nsr[i] <= nsr[i-1];
      nsr[0] <= n;
      if (en) n = (n + 1) % N;
    end
  end

  always @(negedge clk) begin
    if (!rst && vsr[LAT-1]) begin
      real e;
      int k;
      k = nsr[LAT-1];
      ncoef++;
      e = (0.42 - 0.5 * $cos(2*PI*k/(N-1)) + 0.08 * $cos(4*PI*k/(N-1))) * 32768.0;
      if (e > 32767.0) e = 32767.0;
      `CHECK((real'(w) - e) < 3.0 && (e - real'(w)) < 3.0, ("n=%0d: got %0d expected %0.1f", k, w, e))
    end
  end

  initial begin
    rst = 1'b1; en = 1'b0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 2 * N; i++) begin
      en = 1'b1;
      @(negedge clk);
      en = 1'b0;
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
    repeat (LAT + 2) @(negedge clk);
    `CHECK(ncoef == 2 * N, ("%0d coefficients checked, expected %0d", ncoef, 2 * N))
    `TB_FINISH
  end
endmodule
