// DRFM memory controller: provides the addresses and strobes for storing an
// intercepted pulse and recalling it.
//
// User controls, as the document lists them: store_en marks the pulse to be
// stored (samples are written while it is high); store_addr is where the
// pulse's leading edge goes (taken at the rising edge of store_en); recall
// starts a recall cycle; recall_addr is where recall begins; delay is the
// throughput delay, in clocks, impressed on the stored signal before replay.
// recall_len, the number of words replayed, is this design's addition (the
// document does not say how a recall ends).
//
// Timing: a recall pulse at clock t starts reading at t + 1 + delay; read data
// appears one clock later with out_valid. A recall pulse while a recall is
// running is ignored. Addresses wrap around the memory. The write strobe we
// is store_en itself, so storing starts in the same clock as the enable with
// no added latency.
module drfm_mem_ctrl #(
  parameter int unsigned DEPTH   = 4096,
  parameter int unsigned DELAY_W = 16
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     store_en,
  input  logic [$clog2(DEPTH)-1:0] store_addr,
  input  logic                     recall,
  input  logic [$clog2(DEPTH)-1:0] recall_addr,
  input  logic [$clog2(DEPTH):0]   recall_len,
  input  logic [DELAY_W-1:0]       delay,
  output logic                     we,
  output logic [$clog2(DEPTH)-1:0] waddr,
  output logic                     re,
  output logic [$clog2(DEPTH)-1:0] raddr,
  output logic                     out_valid
);
  localparam int unsigned AW = $clog2(DEPTH);

  typedef enum logic [1:0] {IDLE, WAIT, READ} rstate_t;
  rstate_t              st;
  logic                 store_en_q;
  logic [AW-1:0]        wptr;
  logic [DELAY_W-1:0]   dcnt;
  logic [AW:0]          left;

  // Store side: the leading edge goes to store_addr.
  always_ff @(posedge clk) begin
    if (rst) begin
      store_en_q <= 1'b0;
      wptr       <= '0;
    end else begin
      store_en_q <= store_en;
      if (store_en) wptr <= ((store_en && !store_en_q) ? store_addr : wptr) + 1'b1;
    end
  end
  assign we    = store_en;
  assign waddr = (store_en && !store_en_q) ? store_addr : wptr;

  // Recall side.
  always_ff @(posedge clk) begin
    if (rst) begin
      st        <= IDLE;
      dcnt      <= '0;
      left      <= '0;
      raddr     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= re;
      unique case (st)
        IDLE: if (recall && recall_len != 0) begin
          raddr <= recall_addr;
          left  <= recall_len;
          dcnt  <= delay;
          st    <= (delay == 0) ? READ : WAIT;
        end
        WAIT: begin
          dcnt <= dcnt - 1'b1;
          if (dcnt == 1) st <= READ;
        end
        READ: begin
          raddr <= raddr + 1'b1;
          left  <= left - 1'b1;
          if (left == 1) st <= IDLE;
        end
        default: st <= IDLE;
      endcase
    end
  end
  assign re = (st == READ);
endmodule
