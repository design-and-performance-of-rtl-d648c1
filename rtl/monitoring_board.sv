// monitoring_board: the digital part of one monitoring board (MB): three front-end slices and
// the back-end FPGA logic.
//
// Per input slice a fe_channel self-triggers on its discriminators, measures baseline and
// peak of each pulse and stores 16-word frames in its own FIFO (first buffer level). The
// back end counts BOFs broadcast by the controller (cleared by sync); each BOF makes
// mb_builder gather the closed subcycle's frames of the three slices into the builder FIFO
// (second buffer level), and mb_uplink sends the event to the controller over the serial
// backplane line. mb_cmd receives configuration commands; calib_ramp drives the calibration
// DAC for on-board calibration runs.
//
// Backplane: bof, sync and veto are broadcast inputs; busy (any front-end FIFO without room
// for a frame, or the builder FIFO almost full) and error (a BOF mismatch or a corrupted
// command character, held until the next sync) are the board's open-collector lines, here
// plain outputs that the crate ORs. slot is the geographic address from the rotary switch.
// All logic runs on one 40 MHz clock. The builder FIFO depth (8192 words, several subcycles at
// the expected rates) is this design's choice; the text gives none.
module monitoring_board
  import daq_pkg::*;
#(
  parameter int unsigned FE_FIFO_DEPTH = 16384,
  parameter int unsigned BF_DEPTH      = 8192,
  parameter int unsigned CLKS_PER_BIT  = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [3:0]           slot,
  // analog front ends
  input  logic [NUM_CH-1:0]    th1,
  input  logic [NUM_CH-1:0]    th2,
  output logic [NUM_CH-1:0]    ph_reset,
  input  logic [ADC_W-1:0]     adc_data [NUM_CH],
  output logic [NUM_CH-1:0]    hv_sclk,
  output logic [NUM_CH-1:0]    hv_mosi,
  output logic [NUM_CH-1:0]    hv_cs_n,
  input  word_t                slow_in [NUM_CH][NUM_SLOW-1],
  output logic [CAL_DAC_W-1:0] cal_dac,
  // backplane
  input  logic                 bof,
  input  logic                 sync,
  input  logic                 veto,
  input  logic                 rxd,
  output logic                 txd,
  output logic                 busy,
  output logic                 error
);
  localparam int unsigned BAW = $clog2(BF_DEPTH);

  word_t bof_num;
  logic [HV_DAC_W-1:0] hv_code [NUM_CH];
  logic calib_run, sim_mode, ramp_start, ramp_mode, ramp_done, calib_mode;
  word_t cal_nwave, cal_max, cal_step, cal_gap, config_word, ctrl_word, status;
  word_t fe_data [NUM_CH];
  logic [NUM_CH-1:0] fe_empty, fe_busy, fe_idle, fe_rd;
  logic [7:0] fe_dropped [NUM_CH];
  word_t slow [NUM_CH][NUM_SLOW];

  logic bf_wr, bf_full, bf_afull, bf_empty, bf_rd;
  word_t bf_wdata, bf_rdata;
  logic [BAW:0] bf_count;

  logic desc_wr, desc_full, desc_empty, desc_rd, desc_afull;
  word_t desc_bof, desc_count, desc_status;
  logic [47:0] desc_q;
  logic [4:0] desc_cnt;
  logic building;
  logic [7:0] mismatches, mism_q;

  logic reply_valid, reply_ack, frame_err, sending;
  word_t reply_addr, reply_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    bof_num <= '0;
    else if (sync) bof_num <= '0;
    else if (bof)  bof_num <= bof_num + 1'b1;
  end

  assign calib_mode = calib_run || ramp_mode;

  for (genvar c = 0; c < NUM_CH; c++) begin : g_ch
    fe_channel #(.FIFO_DEPTH(FE_FIFO_DEPTH)) u_fe (
      .clk, .rst_n, .channel(2'(c)),
      .th1(th1[c]), .th2(th2[c]), .ph_reset(ph_reset[c]), .adc_data(adc_data[c]),
      .hv_code(hv_code[c]), .hv_sclk(hv_sclk[c]), .hv_mosi(hv_mosi[c]), .hv_cs_n(hv_cs_n[c]),
      .slow_in(slow_in[c]),
      .bof, .sync, .veto, .bof_num, .calib_mode, .sim_mode,
      .rd_en(fe_rd[c]), .rd_data(fe_data[c]), .empty(fe_empty[c]), .busy(fe_busy[c]),
      .idle(fe_idle[c]), .dropped(fe_dropped[c])
    );
    always_comb begin
      slow[c][0] = word_t'(hv_code[c]);
      for (int i = 1; i < NUM_SLOW; i++) slow[c][i] = slow_in[c][i-1];
    end
  end

  mb_builder u_builder (
    .clk, .rst_n, .start(bof), .target(bof_num), .sync,
    .fe_data, .fe_empty, .fe_idle, .fe_rd,
    .bf_wr, .bf_data(bf_wdata), .bf_full,
    .desc_wr, .desc_bof, .desc_count, .desc_status, .desc_full,
    .building, .mismatches
  );

  sync_fifo #(.WIDTH(WORD_W), .DEPTH(BF_DEPTH), .AFULL(BF_DEPTH - 64)) u_bfifo (
    .clk, .rst_n, .wr_en(bf_wr), .wr_data(bf_wdata), .rd_en(bf_rd), .rd_data(bf_rdata),
    .empty(bf_empty), .full(bf_full), .almost_full(bf_afull), .count(bf_count)
  );

  sync_fifo #(.WIDTH(48), .DEPTH(16), .AFULL(15)) u_dfifo (
    .clk, .rst_n, .wr_en(desc_wr), .wr_data({desc_bof, desc_count, desc_status}),
    .rd_en(desc_rd), .rd_data(desc_q), .empty(desc_empty), .full(desc_full),
    .almost_full(desc_afull), .count(desc_cnt)
  );

  mb_uplink #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_up (
    .clk, .rst_n, .slot,
    .desc_valid(!desc_empty), .desc_bof(desc_q[47:32]), .desc_count(desc_q[31:16]),
    .desc_status(desc_q[15:0]), .desc_rd,
    .bf_data(bf_rdata), .bf_empty, .bf_rd,
    .slow, .config_word, .ctrl_word,
    .reply_valid, .reply_addr, .reply_data, .reply_ack, .txd, .sending
  );

  mb_cmd #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_cmd (
    .clk, .rst_n, .rxd, .hv_code, .calib_run, .sim_mode, .ramp_start,
    .cal_nwave, .cal_max, .cal_step, .cal_gap, .config_word, .ctrl_word,
    .status, .slow, .reply_valid, .reply_addr, .reply_data, .reply_ack, .frame_err
  );

  calib_ramp u_ramp (
    .clk, .rst_n, .start(ramp_start), .stop(sync), .n_wave(cal_nwave),
    .max_code(cal_max[CAL_DAC_W-1:0]), .step(cal_step[CAL_DAC_W-1:0]), .gap(cal_gap),
    .dac(cal_dac), .calib_mode(ramp_mode), .done(ramp_done)
  );

  assign busy   = (|fe_busy) || bf_afull;
  assign status = {error, busy, bf_afull, 5'b0, mismatches};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      error  <= 1'b0;
      mism_q <= '0;
    end else begin
      mism_q <= mismatches;
      if (sync) error <= 1'b0;
      else if (frame_err || mismatches != mism_q) error <= 1'b1;
    end
  end
endmodule
