// laser_daq_crate: one crate of the laser-calibration data acquisition: a readout controller
// and NUM_MB monitoring boards on the custom backplane (the full system has two such crates,
// one for the source monitor and one for the local monitor, differing only in board
// configuration).
//
// Backplane wiring: each board has its own serial line pair to the controller (slot i);
// bof, sync and veto are broadcast; each board's busy line goes to the controller; the
// boards' error lines are wire-ORed. A board's slot number is its position.
// External ports are the analog front-end signals of every channel (comparators, ADC data,
// peak-and-hold reset, HV DAC serial lines, slow-control readbacks, calibration DAC), the
// BOF from the laser control board, the CPU instruction port and the USB microcontroller
// slave-FIFO pins. Everything runs on one 40 MHz clock.
module laser_daq_crate
  import daq_pkg::*;
#(
  parameter int unsigned NUM_MB        = 12,
  parameter int unsigned FE_FIFO_DEPTH = 16384,
  parameter int unsigned MB_BF_DEPTH   = 8192,
  parameter int unsigned RX_DEPTH      = 8192,
  parameter int unsigned CR_BF_DEPTH   = 16384,
  parameter int unsigned CLKS_PER_BIT  = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 bof_in,
  // analog front ends, per board and channel
  input  logic [NUM_CH-1:0]    th1 [NUM_MB],
  input  logic [NUM_CH-1:0]    th2 [NUM_MB],
  output logic [NUM_CH-1:0]    ph_reset [NUM_MB],
  input  logic [ADC_W-1:0]     adc_data [NUM_MB][NUM_CH],
  output logic [NUM_CH-1:0]    hv_sclk [NUM_MB],
  output logic [NUM_CH-1:0]    hv_mosi [NUM_MB],
  output logic [NUM_CH-1:0]    hv_cs_n [NUM_MB],
  input  word_t                slow_in [NUM_MB][NUM_CH][NUM_SLOW-1],
  output logic [CAL_DAC_W-1:0] cal_dac [NUM_MB],
  // CPU
  input  logic                 instr_valid,
  input  instr_t               instr,
  output logic                 instr_ready,
  output logic                 resp_valid,
  output word_t                resp_data,
  output logic                 resp_err,
  // USB microcontroller
  output word_t                usb_fd,
  output logic                 usb_slwr_n,
  output logic                 usb_pktend_n,
  output logic [1:0]           usb_fifoadr,
  input  logic                 usb_full_n,
  // backplane observation
  output logic                 veto,
  output logic [NUM_MB-1:0]    mb_busy,
  output logic                 mb_error
);
  logic [NUM_MB-1:0] up, down, err;
  logic bof, sync;

  readout_controller #(
    .NUM_MB(NUM_MB), .RX_DEPTH(RX_DEPTH), .BF_DEPTH(CR_BF_DEPTH), .CLKS_PER_BIT(CLKS_PER_BIT)
  ) u_ctrl (
    .clk, .rst_n, .bof_in, .mb_rxd(up), .mb_txd(down), .bof, .sync, .veto,
    .mb_busy, .mb_error, .instr_valid, .instr, .instr_ready, .resp_valid, .resp_data, .resp_err,
    .usb_fd, .usb_slwr_n, .usb_pktend_n, .usb_fifoadr, .usb_full_n
  );

  for (genvar i = 0; i < NUM_MB; i++) begin : g_mb
    monitoring_board #(
      .FE_FIFO_DEPTH(FE_FIFO_DEPTH), .BF_DEPTH(MB_BF_DEPTH), .CLKS_PER_BIT(CLKS_PER_BIT)
    ) u_mb (
      .clk, .rst_n, .slot(4'(i)),
      .th1(th1[i]), .th2(th2[i]), .ph_reset(ph_reset[i]), .adc_data(adc_data[i]),
      .hv_sclk(hv_sclk[i]), .hv_mosi(hv_mosi[i]), .hv_cs_n(hv_cs_n[i]), .slow_in(slow_in[i]),
      .cal_dac(cal_dac[i]),
      .bof, .sync, .veto, .rxd(down[i]), .txd(up[i]), .busy(mb_busy[i]), .error(err[i])
    );
  end

  assign mb_error = |err;
endmodule
