// sync_fifo: single-clock first-in first-out buffer with show-ahead output.
//
// Used for every buffer level of the acquisition chain: the front-end event FIFO of each
// input slice, the builder FIFO of the monitoring board, and the receiver and builder FIFOs
// of the readout controller. The word at the head is always visible on rd_data while empty
// is low, so a reader can inspect it (for example a BOF number) before deciding to take it.
// The storage is a plain array; write and read pointers carry one extra bit to tell full from
// empty.
//
// Interface: wr_en/wr_data push when not full; rd_en pops the head when not empty. count is
// the number of stored words, almost_full is count >= AFULL. A push into a full FIFO or a pop
// from an empty one is ignored (and flagged by an assertion). Latency: a pushed word is
// visible at the head on the next cycle.
module sync_fifo #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 16384,
  parameter int unsigned AFULL = DEPTH - 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,
  input  logic [WIDTH-1:0]         wr_data,
  input  logic                     rd_en,
  output logic [WIDTH-1:0]         rd_data,
  output logic                     empty,
  output logic                     full,
  output logic                     almost_full,
  output logic [$clog2(DEPTH):0]   count
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wptr, rptr;
  logic do_wr, do_rd;

  assign empty       = (wptr == rptr);
  assign full        = (wptr[AW] != rptr[AW]) && (wptr[AW-1:0] == rptr[AW-1:0]);
  assign count       = wptr - rptr;
  assign almost_full = (count >= (AW+1)'(AFULL));
  assign do_wr       = wr_en && !full;
  assign do_rd       = rd_en && !empty;
  assign rd_data     = mem[rptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) rptr <= rptr + 1'b1;
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && empty));
endmodule
