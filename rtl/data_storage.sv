// Data storage (corner turn) between range compression and Doppler filtering.
//
// Range compression delivers NC range bins per code period, period after
// period. Doppler filtering needs, for each range bin, the NPER values that
// bin took over NPER code periods. Two banks of NC*NPER complex words
// alternate: one is written in arrival order (address p*NC + r) while the
// other, filled earlier, is read out transposed (for r = 0..NC-1, for
// p = 0..NPER-1, address p*NC + r). When the write bank is full the banks swap
// roles, so a bank is never written and read in the same turn.
//
// Interface: StoreIn/enb_in (sfix16_En34 with its enable) in; StoreOut/enb_out
// out. The read runs at one word per clock as soon as a full bank is waiting
// (read data is registered: one clock of latency from address to output), so
// each map leaves as one burst of NC*NPER samples; a new read may start on the
// last clock of the previous one, so back-to-back maps leave back to back. Since input arrives at most
// one word per clock, a read always finishes before the next bank fills; an
// assertion checks this. Bank size and the alternation follow the document;
// the free-running read rate is this design's own choice.
module data_storage
  import radar_pkg::*;
#(
  parameter int unsigned NC   = 102,
  parameter int unsigned NPER = 4096
) (
  input  logic clk,
  input  logic rst,
  input  logic enb_in,
  input  c16_t store_in,
  output logic enb_out,
  output c16_t store_out,
  output logic bank_swap   // pulses when a full bank is handed to the reader
);
  localparam int unsigned DEPTH = NC * NPER;
  localparam int unsigned AW    = $clog2(2 * DEPTH);

  c16_t mem [2 * DEPTH];

  logic          wr_bank;
  logic [AW-1:0] wr_addr;
  logic          rd_bank, rd_busy, rd_pending;
  logic [AW-1:0] rd_addr, rd_row_start;
  logic [$clog2(NPER+1)-1:0] rd_p;
  logic [$clog2(NC+1)-1:0]   rd_r;
  logic          wr_last, rd_last, rd_start;

  assign rd_last  = rd_busy && rd_p == ($clog2(NPER+1))'(NPER - 1) && rd_r == ($clog2(NC+1))'(NC - 1);
  assign rd_start = (rd_pending || wr_last) && (!rd_busy || rd_last);
  assign wr_last = enb_in && (wr_addr == AW'(DEPTH - 1));

  // Write side.
  always_ff @(posedge clk) begin
    if (rst) begin
      wr_bank <= 1'b0;
      wr_addr <= '0;
    end else if (enb_in) begin
      if (wr_last) begin
        wr_addr <= '0;
        wr_bank <= ~wr_bank;
      end else begin
        wr_addr <= wr_addr + 1'b1;
      end
    end
  end

  always_ff @(posedge clk)
    if (enb_in) mem[(wr_bank ? AW'(DEPTH) : AW'(0)) + wr_addr] <= store_in;

  // Read side: transposed walk through the full bank.
  always_ff @(posedge clk) begin
    if (rst) begin
      rd_busy      <= 1'b0;
      rd_pending   <= 1'b0;
      rd_bank      <= 1'b0;
      rd_addr      <= '0;
      rd_row_start <= '0;
      rd_p         <= '0;
      rd_r         <= '0;
    end else begin
      if (wr_last) rd_pending <= 1'b1;
      if (rd_start) begin
        rd_busy      <= 1'b1;
        rd_pending   <= 1'b0;
        rd_bank      <= wr_last ? wr_bank : ~wr_bank;
        rd_addr      <= '0;
        rd_row_start <= '0;
        rd_p         <= '0;
        rd_r         <= '0;
      end else if (rd_busy) begin
        if (rd_p == ($clog2(NPER+1))'(NPER - 1)) begin
          rd_p <= '0;
          if (rd_r == ($clog2(NC+1))'(NC - 1)) begin
            rd_busy <= 1'b0;
          end else begin
            rd_r         <= rd_r + 1'b1;
            rd_row_start <= rd_row_start + 1'b1;
            rd_addr      <= rd_row_start + 1'b1;
          end
        end else begin
          rd_p    <= rd_p + 1'b1;
          rd_addr <= rd_addr + AW'(NC);
        end
      end
    end
  end

  assign bank_swap = wr_last;

  always_ff @(posedge clk) begin
    if (rst) enb_out <= 1'b0;
    else     enb_out <= rd_busy;
    store_out <= mem[(rd_bank ? AW'(DEPTH) : AW'(0)) + rd_addr];
  end

  // The reader must be free when the next bank fills.
  always_ff @(posedge clk)
    if (!rst && wr_last) assert (!rd_busy || rd_last)
      else $error("data_storage: bank filled while the previous one is still being read");
endmodule
