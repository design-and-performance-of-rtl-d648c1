// readout_controller: the FPGA logic of the crate's readout controller (master board).
//
// Input section: NUM_MB ctrl_rx_slice receivers, one per board slot, each parsing its board's
// serial packets into a receiver FIFO, checking integrity and keeping the board's latest
// slow-control header (RX monitoring). ctrl_builder waits for the packets of one BOF from all
// enabled slots and builds the crate event in the builder FIFO, which usb_fx2_if empties into
// the USB microcontroller on its way to the CPU and the online farm. Control section:
// op_decode takes the CPU's instructions; ctrl_tx sends board commands on NUM_MB transmit
// lines; ctrl_run distributes BOF and sync, vetoes data taking while anything is busy,
// measures dead time and latches errors (the boards' error line, or a BOF mismatch seen by
// the builder).
// The builder FIFO holds BF_DEPTH words of 17 bits (a last-word flag). All logic runs on one
// 40 MHz clock, also used as the USB interface clock. Buffer depths are this design's choice.
module readout_controller
  import daq_pkg::*;
#(
  parameter int unsigned NUM_MB       = 12,
  parameter int unsigned RX_DEPTH     = 8192,
  parameter int unsigned BF_DEPTH     = 16384,
  parameter int unsigned CLKS_PER_BIT = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  // laser control board
  input  logic              bof_in,
  // backplane
  input  logic [NUM_MB-1:0] mb_rxd,      // from each board
  output logic [NUM_MB-1:0] mb_txd,      // to each board
  output logic              bof,
  output logic              sync,
  output logic              veto,
  input  logic [NUM_MB-1:0] mb_busy,
  input  logic              mb_error,    // wired-OR
  // CPU
  input  logic              instr_valid,
  input  instr_t            instr,
  output logic              instr_ready,
  output logic              resp_valid,
  output word_t             resp_data,
  output logic              resp_err,
  // USB microcontroller slave FIFO
  output word_t             usb_fd,
  output logic              usb_slwr_n,
  output logic              usb_pktend_n,
  output logic [1:0]        usb_fifoadr,
  input  logic              usb_full_n
);
  localparam int unsigned BAW = $clog2(BF_DEPTH);

  logic [NUM_MB-1:0] enable, info_valid, info_ok, info_rd, rx_empty, rx_rd;
  logic [NUM_MB-1:0] reply_valid, reply_ack;
  word_t info_bof [NUM_MB], info_len [NUM_MB], rx_data [NUM_MB];
  word_t reply_addr [NUM_MB], reply_data [NUM_MB], mon_data [NUM_MB], rx_err [NUM_MB];
  logic [4:0] mon_sel;

  logic bf_wr, bf_full, bf_empty, bf_rd, bf_afull, evt_done, bof_err;
  logic [16:0] bf_wdata, bf_rdata;
  logic [BAW:0] bf_count;
  logic ctrl_busy;
  logic [31:0] words_sent;

  logic run_en, sync_req, err_clr, err_latched;
  word_t bof_count, err_bof, evt_count;
  logic [31:0] dt_mb, dt_ctrl, dt_total;
  logic [NUM_MB-1:0] err_busy;

  logic cmd_valid, cmd_ready;
  logic [3:0] cmd_target;
  word_t cmd_w0, cmd_w1;

  for (genvar i = 0; i < NUM_MB; i++) begin : g_rx
    ctrl_rx_slice #(.RX_DEPTH(RX_DEPTH), .CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
      .clk, .rst_n, .rxd(mb_rxd[i]),
      .rx_rd(rx_rd[i]), .rx_data(rx_data[i]), .rx_empty(rx_empty[i]),
      .info_rd(info_rd[i]), .info_valid(info_valid[i]), .info_bof(info_bof[i]),
      .info_len(info_len[i]), .info_ok(info_ok[i]),
      .reply_valid(reply_valid[i]), .reply_addr(reply_addr[i]), .reply_data(reply_data[i]),
      .reply_ack(reply_ack[i]), .mon_sel, .mon_data(mon_data[i]), .err_count(rx_err[i])
    );
  end

  ctrl_builder #(.NUM_MB(NUM_MB)) u_builder (
    .clk, .rst_n, .enable, .info_valid, .info_bof, .info_len, .info_ok, .info_rd,
    .rx_data, .rx_empty, .rx_rd, .bf_wr, .bf_data(bf_wdata), .bf_full, .evt_done, .bof_err
  );

  sync_fifo #(.WIDTH(17), .DEPTH(BF_DEPTH), .AFULL(BF_DEPTH - 1)) u_bfifo (
    .clk, .rst_n, .wr_en(bf_wr), .wr_data(bf_wdata), .rd_en(bf_rd), .rd_data(bf_rdata),
    .empty(bf_empty), .full(bf_full), .almost_full(bf_afull), .count(bf_count)
  );

  usb_fx2_if u_usb (
    .clk, .rst_n, .bf_data(bf_rdata), .bf_empty, .bf_rd,
    .fd(usb_fd), .slwr_n(usb_slwr_n), .pktend_n(usb_pktend_n), .fifoadr(usb_fifoadr),
    .full_n(usb_full_n), .busy(ctrl_busy), .words_sent
  );

  ctrl_run #(.NUM_MB(NUM_MB)) u_run (
    .clk, .rst_n, .bof_in, .run_en, .sync_req, .enable, .mb_busy, .ctrl_busy,
    .error_in(mb_error || bof_err), .err_clr, .bof, .sync, .veto, .bof_count,
    .dt_mb, .dt_ctrl, .dt_total, .err_latched, .err_bof, .err_busy
  );

  ctrl_tx #(.NUM_MB(NUM_MB), .CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk, .rst_n, .enable, .cmd_valid, .cmd_target, .cmd_w0, .cmd_w1, .cmd_ready, .txd(mb_txd)
  );

  op_decode #(.NUM_MB(NUM_MB)) u_op (
    .clk, .rst_n, .instr_valid, .instr, .instr_ready, .resp_valid, .resp_data, .resp_err,
    .enable, .run_en, .sync_req, .err_clr, .bof_count, .err_latched, .err_bof,
    .dt_mb, .dt_ctrl, .dt_total, .rx_err, .evt_count, .mon_sel, .mon_data,
    .cmd_valid, .cmd_target, .cmd_w0, .cmd_w1, .cmd_ready, .reply_valid, .reply_data, .reply_ack
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        evt_count <= '0;
    else if (sync)     evt_count <= '0;
    else if (evt_done) evt_count <= evt_count + 1'b1;
  end
endmodule
