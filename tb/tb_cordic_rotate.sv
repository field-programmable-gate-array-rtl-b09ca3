// Checks the rotation CORDIC against cos/sin computed in floating point:
// random phases with en held high, then a stretch with en toggling to show the
// pipeline holds its contents while en is low. Amplitude 1.0 = 65536 (18-bit
// output); tolerance 6 LSB. Latency STAGES+1 enabled cycles.
`include "tb_common.svh"
module tb_cordic_rotate;
  import radar_pkg::*;
  `TB_COUNTERS
  localparam int STAGES = 16;
  localparam real PI = 3.14159265358979323846;
  logic clk, en;
  logic [31:0] phase;
  logic signed [17:0] c, s;
  `TB_CLOCK(clk)
  `TB_WATCHDOG(clk, 20000)

  cordic_rotate #(.OUT_W(18), .STAGES(STAGES)) dut (.clk(clk), .en(en), .phase(phase), .cos_o(c), .sin_o(s));

  logic [31:0] hist [$];
  initial begin
    en = 1'b0;
    phase = '0;
    repeat (3) @(posedge clk);
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      en = (n < 1000) ? 1'b1 : 1'($urandom_range(0, 1));
      phase = (n % 7 == 0) ? 32'(n / 7) << 28 : $urandom;
      if (en) hist.push_back(phase);
      @(posedge clk);
      #1;
      if (en && hist.size() > STAGES) begin
        real a, ec, es;
        logic [31:0] p;
        p = hist.pop_front();
        a = 2.0 * PI * real'(p) / 4294967296.0;
        ec = $cos(a) * 65536.0;
        es = $sin(a) * 65536.0;
        `CHECK(((real'(c) - ec) < 6.0) && ((ec - real'(c)) < 6.0) &&
               ((real'(s) - es) < 6.0) && ((es - real'(s)) < 6.0),
               ("phase %h: got (%0d,%0d) expected (%0.1f,%0.1f)", p, c, s, ec, es))
      end
    end
    `TB_FINISH
  end
endmodule
