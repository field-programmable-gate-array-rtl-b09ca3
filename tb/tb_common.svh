// Shared checking helpers for the self-checking testbenches: a check counter,
// a failure counter, a CHECK macro that prints the failing comparison, and a
// clock-cycle watchdog that ends the run with a failure.
`ifndef TB_COMMON_SVH
`define TB_COMMON_SVH

`define TB_COUNTERS int checks = 0; int failures = 0;

`define CHECK(cond, fmt) \
  begin \
    checks++; \
    if (!(cond)) begin \
      failures++; \
      if (failures <= 20) $display("FAIL at %0t: %s", $time, $sformatf fmt); \
    end \
  end

`define TB_FINISH \
  begin \
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); \
    $finish; \
  end

`define TB_CLOCK(clk) initial clk = 1'b0; always #5 clk = ~clk;

`define TB_WATCHDOG(clk, ncycles) \
  initial begin \
    repeat (ncycles) @(posedge clk); \
    failures++; \
    $display("FAIL: watchdog expired after %0d cycles", ncycles); \
    `TB_FINISH \
  end

`endif
