// Checks the DRFM memory controller together with the dual-ported memory.
// Two pulses of random I/Q samples are stored at chosen addresses (the second
// wraps around the end of the memory) while a recall of the first is running,
// so capture and replay overlap. Each recall must start exactly 1 + delay
// clocks after the recall strobe (data one clock later), replay recall_len
// words from recall_addr in order, and ignore a strobe that arrives while busy.
`include "tb_common.svh"
module tb_drfm_memory;
  import radar_pkg::*;
  `TB_COUNTERS
  localparam int DEPTH = 64;
  logic clk, rst, store_en, recall, we, re, out_valid;
  logic [5:0] store_addr, recall_addr, waddr, raddr;
  logic [6:0] recall_len;
  logic [15:0] delay;
  iq8_t wdata, rdata;
  `TB_CLOCK(clk)
  `TB_WATCHDOG(clk, 20000)

  drfm_mem_ctrl #(.DEPTH(DEPTH), .DELAY_W(16)) u_ctrl (
    .clk(clk), .rst(rst), .store_en(store_en), .store_addr(store_addr),
    .recall(recall), .recall_addr(recall_addr), .recall_len(recall_len), .delay(delay),
    .we(we), .waddr(waddr), .re(re), .raddr(raddr), .out_valid(out_valid));
  drfm_dpram #(.DEPTH(DEPTH)) u_mem (
    .clk(clk), .we(we), .waddr(waddr), .wdata(wdata), .re(re), .raddr(raddr), .rdata(rdata));

  iq8_t model [DEPTH];
  int cyc = 0, t_recall = -1, t_first = -1, nrd = 0, rd_base = 0, exp_delay = 0;
  int ignored = 0;

  always @(posedge clk) begin
    cyc++;
    if (!rst && out_valid) begin
      iq8_t e;
      e = model[(rd_base + nrd) % DEPTH];
      if (nrd == 0) begin
        t_first = cyc;
        `CHECK(t_first - t_recall == exp_delay + 2, ("recall data after %0d clocks, expected %0d", t_first - t_recall, exp_delay + 2))
      end
      `CHECK(rdata == e, ("recall word %0d: got %h expected %h", nrd, rdata, e))
      nrd++;
    end
  end

  task automatic store(input int addr, input int len);
    store_addr = 6'(addr);
    for (int n = 0; n < len; n++) begin
      store_en = 1'b1;
      wdata.i = 8'($urandom); wdata.q = 8'($urandom);
      model[(addr + n) % DEPTH] = wdata;
      @(negedge clk);
    end
    store_en = 1'b0;
  endtask

  task automatic start_recall(input int addr, input int len, input int d);
    recall = 1'b1; recall_addr = 6'(addr); recall_len = 7'(len); delay = 16'(d);
    rd_base = addr; exp_delay = d; nrd = 0; t_recall = cyc + 1;
    @(negedge clk);
    recall = 1'b0;
  endtask

  initial begin
    rst = 1'b1; store_en = 1'b0; recall = 1'b0; store_addr = '0; recall_addr = '0;
    recall_len = '0; delay = '0; wdata = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    store(5, 20);
    @(negedge clk);
    start_recall(5, 20, 7);
    // a second strobe while busy must be ignored
    repeat (3) @(negedge clk);
    recall = 1'b1; recall_addr = 6'd0; recall_len = 7'd3; delay = 16'd0;
    @(negedge clk);
    recall = 1'b0;
    // capture a second pulse, wrapping past the end, during the replay
    store(50, 30);
    repeat (10) @(negedge clk);
    `CHECK(nrd == 20, ("first recall gave %0d words, expected 20", nrd))
    start_recall(50, 30, 0);
    repeat (40) @(negedge clk);
    `CHECK(nrd == 30, ("second recall gave %0d words, expected 30", nrd))
    start_recall(60, 10, 100);
    repeat (130) @(negedge clk);
    `CHECK(nrd == 10, ("third recall gave %0d words, expected 10", nrd))
    `TB_FINISH
  end
endmodule
