// sync_fifo: single-clock first-in first-out buffer of DEPTH words of W bits
// (DEPTH a power of two), show-ahead: rd_data is the oldest word whenever
// rd_valid is high and it is removed by rd_en.  Writing into a full FIFO or
// reading an empty one is a usage error, caught by assertions; the EP module
// avoids both by credit counting.
module sync_fifo #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  input  logic         rd_en,
  output logic         rd_valid,
  output logic [W-1:0] rd_data,
  output logic         full
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wptr, rptr;

  always_ff @(posedge clk) begin
    if (wr_en) mem[wptr[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (wr_en) wptr <= wptr + 1'b1;
      if (rd_en) rptr <= rptr + 1'b1;
    end
  end

  assign rd_valid = (wptr != rptr);
  assign full     = (wptr[AW] != rptr[AW]) && (wptr[AW-1:0] == rptr[AW-1:0]);
  assign rd_data  = mem[rptr[AW-1:0]];

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full))
    else $error("sync_fifo: write into a full FIFO");
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && !rd_valid))
    else $error("sync_fifo: read from an empty FIFO");

  initial assert (DEPTH == (1 << AW)) else $error("sync_fifo: DEPTH must be a power of two");
endmodule
