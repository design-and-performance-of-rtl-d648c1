// fe_channel: the front-end FPGA logic of one monitoring-board input slice.
//
// Chain: comparator outputs -> trigger_logic (fast trigger, gate, peak-and-hold reset, pulse
// type) -> adc_readout (circular buffer, baseline and peak averages) -> frame_assembler (16-word
// frame) -> front-end FIFO. Alongside, hv_control keeps the photodetector HV DAC programmed.
// The FIFO holds FIFO_DEPTH 16-bit words, 1024 frames by default (about 32 kbyte, as in the
// original board). busy is the full condition: fewer than 16 free words, so no further frame
// fits; the board raises its busy line from it. idle is high when no pulse is in flight, so
// the board builder knows no more frames of the current subcycle can appear.
// Interface toward the board builder: the FIFO read side (show-ahead rd_data, rd_en, empty).
module fe_channel
  import daq_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH  = 16384,
  parameter int unsigned GATE_CYCLES = 40,
  parameter int unsigned PEAK_DELAY  = 24,
  parameter int unsigned N_AVG       = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [1:0]          channel,
  // analog front end
  input  logic                th1,
  input  logic                th2,
  output logic                ph_reset,
  input  logic [ADC_W-1:0]    adc_data,
  // HV DAC serial interface and slow-control readback
  input  logic [HV_DAC_W-1:0] hv_code,
  output logic                hv_sclk,
  output logic                hv_mosi,
  output logic                hv_cs_n,
  input  word_t               slow_in [NUM_SLOW-1], // HV voltage, HV current, 3 temperatures
  // run control
  input  logic                bof,
  input  logic                sync,
  input  logic                veto,
  input  word_t               bof_num,
  input  logic                calib_mode,
  input  logic                sim_mode,
  // FIFO read side
  input  logic                rd_en,
  output word_t               rd_data,
  output logic                empty,
  output logic                busy,
  output logic                idle,
  output logic [7:0]          dropped
);
  localparam int unsigned AW = $clog2(FIFO_DEPTH);

  logic trig, gate, class_valid, meas_busy, meas_done, asm_busy;
  pulse_type_e ptype;
  logic [ADC_W-1:0] baseline, peak;
  logic wr_en, full, afull;
  word_t wr_data;
  logic [AW:0] count;
  logic [HV_DAC_W-1:0] hv_written;
  logic hv_busy;
  word_t slow [NUM_SLOW];

  always_comb begin
    slow[0] = word_t'(hv_written);
    for (int i = 1; i < NUM_SLOW; i++) slow[i] = slow_in[i-1];
  end

  trigger_logic #(.GATE_CYCLES(GATE_CYCLES)) u_trig (
    .clk, .rst_n, .th1, .th2, .veto, .calib_mode, .sim_mode,
    .trig, .gate, .ph_reset, .class_valid, .ptype
  );

  adc_readout #(.N_AVG(N_AVG), .PEAK_DELAY(PEAK_DELAY)) u_adc (
    .clk, .rst_n, .adc_data, .trig, .busy(meas_busy), .done(meas_done), .baseline, .peak
  );

  frame_assembler #(.FIFO_AW(AW)) u_frame (
    .clk, .rst_n, .channel, .bof, .sync, .bof_num, .slow, .trig, .class_valid, .ptype,
    .meas_done, .baseline, .peak, .fifo_count(count), .fifo_full(full), .fifo_afull(afull),
    .wr_en, .wr_data, .busy(asm_busy), .dropped
  );

  sync_fifo #(.WIDTH(WORD_W), .DEPTH(FIFO_DEPTH), .AFULL(FIFO_DEPTH - FE_FRAME_WORDS + 1)) u_fifo (
    .clk, .rst_n, .wr_en, .wr_data, .rd_en, .rd_data, .empty, .full, .almost_full(afull), .count
  );

  hv_control u_hv (
    .clk, .rst_n, .code(hv_code), .sclk(hv_sclk), .mosi(hv_mosi), .cs_n(hv_cs_n),
    .written_code(hv_written), .busy(hv_busy)
  );

  assign busy = afull;
  assign idle = !gate && !meas_busy && !asm_busy && !trig;
endmodule
