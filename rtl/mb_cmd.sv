// mb_cmd: command receiver and register file of the monitoring-board back-end FPGA, the
// board's gateway for configuration and monitoring.
//
// Commands arrive on the board's receive line (uart_rx) as two words: {opcode[3:0],
// address[11:0]} and data. CMD_WRITE stores data into a register; CMD_READ returns the
// register through the uplink as a reply packet. Registers (see daq_pkg):
//   REG_HV0+ch      HV DAC code of channel ch (12 bit)
//   REG_CTRL        [0] calibration run, [1] simulation mode, [2] start ramp sequence (pulse)
//   REG_CAL_NWAVE, REG_CAL_MAX, REG_CAL_STEP, REG_CAL_GAP   ramp-sequence settings
//   REG_CONFIG      configuration word reported in every event header
//   REG_STATUS      read only: {error, busy, builder FIFO almost full, 5'b0, mismatches}
//   REG_SLOW0+8*ch+i  read only: slow-control value i of channel ch
// Only the existence of board registers written by the controller is from the text; the
// command format and the map are this design's choice. A read arriving while the previous
// reply has not been sent is dropped.
module mb_cmd
  import daq_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        rxd,
  output logic [HV_DAC_W-1:0] hv_code [NUM_CH],
  output logic        calib_run,
  output logic        sim_mode,
  output logic        ramp_start,
  output word_t       cal_nwave,
  output word_t       cal_max,
  output word_t       cal_step,
  output word_t       cal_gap,
  output word_t       config_word,
  output word_t       ctrl_word,
  input  word_t       status,
  input  word_t       slow [NUM_CH][NUM_SLOW],
  output logic        reply_valid,
  output word_t       reply_addr,
  output word_t       reply_data,
  input  logic        reply_ack,
  output logic        frame_err
);
  logic  w_valid;
  word_t w;
  logic  have_op;
  word_t op_word;
  logic [11:0] addr;
  word_t rd_val;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk, .rst_n, .rxd, .word_valid(w_valid), .word(w), .frame_err
  );

  assign addr      = op_word[11:0];
  assign ctrl_word = {13'b0, 1'b0, sim_mode, calib_run};

  always_comb begin
    rd_val = 16'hDEAD;
    if (addr < REG_HV0 + 12'(NUM_CH)) rd_val = word_t'(hv_code[addr[1:0]]);
    else if (addr == REG_CTRL)      rd_val = ctrl_word;
    else if (addr == REG_CAL_NWAVE) rd_val = cal_nwave;
    else if (addr == REG_CAL_MAX)   rd_val = cal_max;
    else if (addr == REG_CAL_STEP)  rd_val = cal_step;
    else if (addr == REG_CAL_GAP)   rd_val = cal_gap;
    else if (addr == REG_CONFIG)    rd_val = config_word;
    else if (addr == REG_STATUS)    rd_val = status;
    else if (addr >= REG_SLOW0 && addr < REG_SLOW0 + 12'(8 * NUM_CH) && addr[2:0] < 3'(NUM_SLOW))
      rd_val = slow[addr[4:3]][addr[2:0]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_op <= 1'b0; op_word <= '0;
      for (int c = 0; c < NUM_CH; c++) hv_code[c] <= '0;
      calib_run <= 1'b0; sim_mode <= 1'b0; ramp_start <= 1'b0;
      cal_nwave <= 16'd10; cal_max <= 16'd6000; cal_step <= 16'd100; cal_gap <= 16'd4000;
      config_word <= '0;
      reply_valid <= 1'b0; reply_addr <= '0; reply_data <= '0;
    end else begin
      ramp_start <= 1'b0;
      if (reply_ack) reply_valid <= 1'b0;
      if (w_valid) begin
        if (!have_op) begin
          op_word <= w;
          have_op <= 1'b1;
        end else begin
          have_op <= 1'b0;
          if (op_word[15:12] == CMD_WRITE) begin
            if (addr < REG_HV0 + 12'(NUM_CH)) hv_code[addr[1:0]] <= w[HV_DAC_W-1:0];
            else if (addr == REG_CTRL) begin
              calib_run  <= w[0];
              sim_mode   <= w[1];
              ramp_start <= w[2];
            end
            else if (addr == REG_CAL_NWAVE) cal_nwave <= w;
            else if (addr == REG_CAL_MAX)   cal_max   <= w;
            else if (addr == REG_CAL_STEP)  cal_step  <= w;
            else if (addr == REG_CAL_GAP)   cal_gap   <= w;
            else if (addr == REG_CONFIG)    config_word <= w;
          end else if (op_word[15:12] == CMD_READ && !reply_valid) begin
            reply_valid <= 1'b1;
            reply_addr  <= word_t'(addr);
            reply_data  <= rd_val;
          end
        end
      end
    end
  end
endmodule
