// tb_mb_cmd: self-checking test of the board command receiver and register file.
// Commands are sent over a serial line by a uart_tx. Checks: HV codes, ramp settings,
// configuration, simulation and calibration bits are written; the ramp-start bit gives a
// single pulse; a read returns the register value through reply_valid/addr/data until
// acknowledged; read-only status and slow-control registers read back their inputs.
module tb_mb_cmd;
  import daq_pkg::*;
  logic clk = 0, rst_n = 0;
  logic valid = 0, ready, line;
  word_t word = 0;
  logic [HV_DAC_W-1:0] hv_code [NUM_CH];
  logic calib_run, sim_mode, ramp_start, reply_valid, reply_ack = 0, frame_err;
  word_t cal_nwave, cal_max, cal_step, cal_gap, config_word, ctrl_word, reply_addr, reply_data;
  word_t status = 16'h4321;
  word_t slow [NUM_CH][NUM_SLOW];
  int checks = 0, failures = 0, starts = 0;

  uart_tx u_tx (.clk, .rst_n, .valid, .word, .ready, .txd(line));
  mb_cmd dut (.clk, .rst_n, .rxd(line), .hv_code, .calib_run, .sim_mode, .ramp_start,
    .cal_nwave, .cal_max, .cal_step, .cal_gap, .config_word, .ctrl_word, .status, .slow,
    .reply_valid, .reply_addr, .reply_data, .reply_ack, .frame_err);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && ramp_start) starts++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic send(input word_t w);
    @(negedge clk) begin word = w; valid = 1; end
    @(posedge clk);
    while (!ready) @(posedge clk);
    #1 valid = 0;
  endtask

  task automatic cmd(input logic [3:0] op, input logic [11:0] a, input word_t d);
    send({op, a});
    send(d);
    repeat (120) @(negedge clk);
  endtask

  task automatic rd(input logic [11:0] a, input word_t expv);
    cmd(CMD_READ, a, 16'h0);
    check(reply_valid, "reply valid");
    check(reply_addr == 16'(a) && reply_data == expv, $sformatf("read %03h", a));
    @(negedge clk) reply_ack = 1;
    @(negedge clk) reply_ack = 0;
    check(!reply_valid, "reply acknowledged");
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < NUM_CH; c++) for (int i = 0; i < NUM_SLOW; i++) slow[c][i] = 16'(c * 100 + i);
    repeat (3) @(posedge clk);
    rst_n = 1;
    cmd(CMD_WRITE, REG_HV0 + 1, 16'h0ABC);
    check(hv_code[1] == 12'hABC, "HV1 written");
    cmd(CMD_WRITE, REG_HV0 + 2, 16'h0123);
    check(hv_code[2] == 12'h123 && hv_code[0] == 0, "HV2 written, HV0 untouched");
    cmd(CMD_WRITE, REG_CAL_STEP, 16'd55);
    cmd(CMD_WRITE, REG_CAL_MAX, 16'd6300);
    cmd(CMD_WRITE, REG_CONFIG, 16'h00A1);
    check(cal_step == 55 && cal_max == 6300 && config_word == 16'h00A1, "settings written");
    cmd(CMD_WRITE, REG_CTRL, 16'h0006);
    check(sim_mode && !calib_run && starts == 1, "sim mode set, one ramp start pulse");
    repeat (50) @(negedge clk);
    check(starts == 1, "ramp start is a single pulse");
    rd(REG_HV0 + 1, 16'h0ABC);
    rd(REG_CAL_MAX, 16'd6300);
    rd(REG_STATUS, 16'h4321);
    rd(REG_SLOW0 + 8 * 2 + 3, 16'd203);
    rd(REG_CTRL, 16'h0002);
    check(frame_err == 0, "no framing errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
