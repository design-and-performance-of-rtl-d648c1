// ctrl_rx_slice: one of the readout controller's input slices, serving one monitoring board.
//
// The slice receives the board's serial line (uart_rx) and parses its packets:
//   * an event ({8'hEB, 4'b0, slot}, BOF, N, status, 20 more header words, N data words,
//     checksum): the 24 header words and the N data words are written into the slice's
//     receiver FIFO as they arrive; the checksum (XOR of all words before it) is verified and
//     one record {BOF, length, ok} is pushed into the info FIFO when the packet ends. The
//     length is the number of words actually stored (24 + N unless the receiver FIFO
//     overflowed), so the builder never waits for a word that was lost. ok is low on a
//     checksum mismatch, a line framing error, or receiver FIFO overflow. A packet that finds
//     the info FIFO full when it starts is not stored at all. Each of these cases increments
//     err_count. Header words 3..23 (status and slow-control
//     values) are kept in a monitor register file: this is the RX monitoring logic, read
//     by the CPU through the op decoder.
//   * a register reply ({8'h5C, 4'b0, slot}, address, data): presented on reply_valid until
//     reply_ack.
// Words that start neither packet are skipped. The receiver FIFO is show-ahead; the builder
// reads it with rx_rd and the info FIFO with info_rd.
// Parallel per-board receivers, the integrity check and the receiver FIFOs follow the text;
// the packet formats, the checksum and the FIFO sizes are this design's choice.
module ctrl_rx_slice
  import daq_pkg::*;
#(
  parameter int unsigned RX_DEPTH     = 8192,
  parameter int unsigned CLKS_PER_BIT = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        rxd,
  // receiver FIFO read side
  input  logic        rx_rd,
  output word_t       rx_data,
  output logic        rx_empty,
  // info FIFO read side
  input  logic        info_rd,
  output logic        info_valid,
  output word_t       info_bof,
  output word_t       info_len,
  output logic        info_ok,
  // register reply
  output logic        reply_valid,
  output word_t       reply_addr,
  output word_t       reply_data,
  input  logic        reply_ack,
  // monitoring
  input  logic [4:0]  mon_sel,
  output word_t       mon_data,
  output word_t       err_count
);
  localparam int unsigned AW = $clog2(RX_DEPTH);
  localparam int unsigned MON_N = MB_HDR_WORDS - 3;

  typedef enum logic [2:0] {S_HUNT, S_HDR, S_DATA, S_SUM, S_RADDR, S_RDATA} state_e;

  state_e state;
  logic   w_valid, ferr;
  word_t  w, sum, bof_q, remaining;
  logic [4:0] idx;
  logic   bad, skip;
  word_t  wr_cnt;                      // words of this packet actually stored
  word_t  mon [MON_N];
  word_t  mon_tmp [MON_N];

  logic   rx_wr, rx_full, rx_afull;
  logic [AW:0] rx_count;
  logic   info_wr, info_empty, info_full, info_afull;
  logic [32:0] info_q;
  logic [4:0]  info_cnt;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk, .rst_n, .rxd, .word_valid(w_valid), .word(w), .frame_err(ferr)
  );

  // a packet that finds the info FIFO full at its start is skipped whole, so that the
  // receiver FIFO never holds words without a record
  assign rx_wr = w_valid && ((state == S_HUNT && w[15:8] == MB_EVT_MARK && !info_full) ||
                            ((state == S_HDR || state == S_DATA) && !skip));

  sync_fifo #(.WIDTH(WORD_W), .DEPTH(RX_DEPTH), .AFULL(RX_DEPTH - 1)) u_rxfifo (
    .clk, .rst_n, .wr_en(rx_wr && !rx_full), .wr_data(w), .rd_en(rx_rd), .rd_data(rx_data),
    .empty(rx_empty), .full(rx_full), .almost_full(rx_afull), .count(rx_count)
  );

  assign info_wr = w_valid && (state == S_SUM) && !skip;

  sync_fifo #(.WIDTH(33), .DEPTH(16), .AFULL(15)) u_info (
    .clk, .rst_n, .wr_en(info_wr && !info_full),
    .wr_data({bof_q, wr_cnt, !bad && (w == sum) && !ferr}),
    .rd_en(info_rd), .rd_data(info_q), .empty(info_empty), .full(info_full),
    .almost_full(info_afull), .count(info_cnt)
  );

  assign info_valid = !info_empty;
  assign info_bof   = info_q[32:17];
  assign info_len   = info_q[16:1];
  assign info_ok    = info_q[0];
  assign mon_data   = (mon_sel < 5'(MON_N)) ? mon[mon_sel] : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_HUNT; sum <= '0; bof_q <= '0; remaining <= '0; idx <= '0;
      bad <= 1'b0; skip <= 1'b0; wr_cnt <= '0; err_count <= '0;
      reply_valid <= 1'b0; reply_addr <= '0; reply_data <= '0;
      for (int i = 0; i < MON_N; i++) begin mon[i] <= '0; mon_tmp[i] <= '0; end
    end else begin
      if (reply_ack) reply_valid <= 1'b0;
      if (ferr && state != S_HUNT) bad <= 1'b1;
      if (rx_wr && !rx_full) wr_cnt <= (state == S_HUNT) ? 16'd1 : wr_cnt + 1'b1;
      else if (w_valid && state == S_HUNT) wr_cnt <= '0;
      if (w_valid) begin
        unique case (state)
          S_HUNT: begin
            if (w[15:8] == MB_EVT_MARK) begin
              sum   <= w;
              idx   <= 5'd1;
              bad   <= rx_full;
              skip  <= info_full;
              state <= S_HDR;
            end else if (w[15:8] == MB_REPLY_MARK) begin
              state <= S_RADDR;
            end
          end
          S_HDR: begin
            sum <= sum ^ w;
            if (rx_full) bad <= 1'b1;
            if (idx == 5'd1) bof_q <= w;
            if (idx == 5'd2) remaining <= w;
            if (idx >= 5'd3) mon_tmp[idx - 5'd3] <= w;
            if (idx == 5'(MB_HDR_WORDS - 1)) state <= (remaining == 0) ? S_SUM : S_DATA;
            idx <= idx + 1'b1;
          end
          S_DATA: begin
            sum <= sum ^ w;
            if (rx_full) bad <= 1'b1;
            remaining <= remaining - 1'b1;
            if (remaining == 16'd1) state <= S_SUM;
          end
          S_SUM: begin
            state <= S_HUNT;
            if (bad || w != sum || skip) err_count <= err_count + 1'b1;
            else for (int i = 0; i < MON_N; i++) mon[i] <= mon_tmp[i];
          end
          S_RADDR: begin
            reply_addr <= w;
            state      <= S_RDATA;
          end
          S_RDATA: begin
            reply_data  <= w;
            reply_valid <= 1'b1;
            state       <= S_HUNT;
          end
          default: state <= S_HUNT;
        endcase
      end
    end
  end
endmodule
