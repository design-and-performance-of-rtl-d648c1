// tb_monitoring_board: one monitoring board with small front-end FIFOs, driven by three analog
// front-end models and a serial command line, with its event line decoded word by word.
// Phases: (1) write an HV DAC code and read it back as a register reply; (2) laser and
// americium pulses in one BOF subcycle, then the next BOF builds the event: header fields,
// slow-control words, pulse types, channel, baseline, peak, timestamps rising and checksum;
// (3) simulation mode pulses are tagged SIM; (4) calibration mode with ramp start drives the
// calibration DAC and tags pulses CALIB; (5) filling a front-end FIFO raises busy and drops
// frames, which the event reports; (6) a broken character on the command line latches the
// error output, and sync clears it and restarts BOF numbering.
module tb_monitoring_board;
  import daq_pkg::*;
  localparam int CPB = 4;
  localparam logic [3:0] SLOT = 4'd5;
  logic clk = 0, rst_n = 0;
  logic [NUM_CH-1:0] th1, th2, ph_reset, hv_sclk, hv_mosi, hv_cs_n;
  logic [ADC_W-1:0] adc_data [NUM_CH];
  word_t slow_in [NUM_CH][NUM_SLOW-1];
  logic [CAL_DAC_W-1:0] cal_dac;
  logic bof = 0, sync = 0, veto = 0, rxd, txd, busy, error;
  logic [NUM_CH-1:0] fire = 0;
  logic [13:0] amp [NUM_CH];
  logic cmd_valid = 0, cmd_ready, cmd_txd, break_line = 0;
  word_t cmd_word;
  logic up_valid, up_err;
  word_t up_word;
  word_t q[$];
  int checks = 0, failures = 0, busy_seen = 0, cal_max = 0;

  assign rxd = cmd_txd & !break_line;

  monitoring_board #(.FE_FIFO_DEPTH(64), .BF_DEPTH(256), .CLKS_PER_BIT(CPB)) dut (
    .clk, .rst_n, .slot(SLOT), .th1, .th2, .ph_reset, .adc_data, .hv_sclk, .hv_mosi, .hv_cs_n,
    .slow_in, .cal_dac, .bof, .sync, .veto, .rxd, .txd, .busy, .error
  );
  for (genvar c = 0; c < NUM_CH; c++) begin : g_fe
    fe_analog_model u_fe (.clk, .fire(fire[c]), .amp(amp[c]), .ph_reset(ph_reset[c]),
                          .th1(th1[c]), .th2(th2[c]), .adc_data(adc_data[c]));
  end
  uart_tx #(.CLKS_PER_BIT(CPB)) u_cmd (.clk, .rst_n, .valid(cmd_valid), .word(cmd_word),
                                       .ready(cmd_ready), .txd(cmd_txd));
  uart_rx #(.CLKS_PER_BIT(CPB)) u_up (.clk, .rst_n, .rxd(txd), .word_valid(up_valid),
                                      .word(up_word), .frame_err(up_err));

  always #5 clk = ~clk;
  always_comb for (int c = 0; c < NUM_CH; c++)
    for (int i = 0; i < NUM_SLOW - 1; i++) slow_in[c][i] = 16'h100 + 16'(c * 16 + i);
  always @(posedge clk) if (rst_n) begin
    if (up_valid) q.push_back(up_word);
    if (busy) busy_seen++;
    if (int'(cal_dac) > cal_max) cal_max = int'(cal_dac);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic send(input word_t w);
    @(negedge clk) begin cmd_valid = 1; cmd_word = w; end
    @(posedge clk);
    while (!cmd_ready) @(posedge clk);
    #1 cmd_valid = 0;
  endtask

  task automatic reg_write(input logic [11:0] a, input word_t d);
    send({CMD_WRITE, a}); send(d);
    repeat (200) @(posedge clk);
  endtask

  task automatic pulse(input int c, input int a);
    @(negedge clk) begin fire[c] = 1; amp[c] = 14'(a); end
    @(negedge clk) fire[c] = 0;
    repeat (120) @(posedge clk);
  endtask

  task automatic do_bof();
    @(negedge clk) bof = 1;
    @(negedge clk) bof = 0;
  endtask

  task automatic wait_words(input int n);
    int t = 0;
    while (q.size() < n && t < 20000) begin @(posedge clk); t++; end
  endtask

  // Pops one event and checks it; exp_type/exp_amp per pulse in channel order.
  task automatic get_event(input word_t exp_bof, input int np, input int ptypes [],
                           input int pch [], input int pamp [], input int exp_mism);
    word_t w [$];
    word_t sum = 0;
    int n;
    wait_words(MB_HDR_WORDS);
    check(q.size() >= MB_HDR_WORDS, "event header received");
    if (q.size() < MB_HDR_WORDS) return;
    n = int'(q[2]);
    wait_words(MB_HDR_WORDS + n + 1);
    for (int i = 0; i < MB_HDR_WORDS + n + 1 && q.size() > 0; i++) w.push_back(q.pop_front());
    check(w[0] == mb_evt_marker(SLOT), "event marker");
    check(w[1] == exp_bof, $sformatf("event BOF %0d expected %0d", w[1], exp_bof));
    check(n == PULSE_WORDS * np, $sformatf("data words %0d expected %0d", n, PULSE_WORDS * np));
    check(w[5] == 16'h0345 && w[8] == 16'h0110 && w[11] == 16'h0111, "HV words");
    check(w[13] == 16'h0102 && w[21] == 16'h0124, "temperature words");
    for (int i = 0; i < w.size() - 1; i++) sum ^= w[i];
    check(w.size() == MB_HDR_WORDS + n + 1 && w[w.size() - 1] == sum, "checksum");
    if (n != PULSE_WORDS * np || w.size() != MB_HDR_WORDS + n + 1) return;
    for (int p = 0; p < np; p++) begin
      int b = MB_HDR_WORDS + PULSE_WORDS * p;
      check(w[b][15:14] == 2'(ptypes[p]) && w[b][13:12] == 2'(pch[p]),
            $sformatf("pulse %0d type %0d ch %0d", p, w[b][15:14], w[b][13:12]));
      check(w[b + 3] == 500 && w[b + 4] == 16'(500 + pamp[p]),
            $sformatf("pulse %0d baseline %0d peak %0d", p, w[b + 3], w[b + 4]));
    end
    check(int'(w[3][7:0]) == exp_mism, "builder mismatch count");
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < NUM_CH; c++) amp[c] = 0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (50) @(posedge clk);
    // (1) register write and read back
    reg_write(REG_HV0 + 1, 16'h0345);
    send({CMD_READ, REG_HV0 + 12'd1});
    send(16'h0000);
    wait_words(3);
    check(q.size() == 3 && q[0] == {MB_REPLY_MARK, 4'b0, SLOT} && q[1] == 16'h0001 && q[2] == 16'h0345,
          "register reply");
    q.delete();
    // (2) laser and americium
    do_bof();                                    // BOF 1 opens, empty event of BOF 0
    get_event(16'd0, 0, '{0}, '{0}, '{0}, 0);
    pulse(0, 3000); pulse(1, 1000); pulse(2, 4000); pulse(0, 2500);
    do_bof();                                    // BOF 2 opens, event of BOF 1 built
    get_event(16'd1, 4, '{PT_LASER, PT_LASER, PT_AMERICIUM, PT_LASER}, '{0, 0, 1, 2},
              '{3000, 2500, 1000, 4000}, 0);
    // (3) simulation mode
    reg_write(REG_CTRL, 16'h0002);
    pulse(1, 3000); pulse(1, 3100);
    do_bof();                                    // BOF 3
    get_event(16'd2, 2, '{PT_SIM, PT_SIM}, '{1, 1}, '{3000, 3100}, 0);
    // (4) calibration mode with ramp
    reg_write(REG_CAL_NWAVE, 16'd3);
    reg_write(REG_CAL_STEP, 16'd2500);
    reg_write(REG_CAL_GAP, 16'd40);
    reg_write(REG_CTRL, 16'h0005);
    pulse(2, 2200);
    repeat (20000) @(posedge clk);
    do_bof();                                    // BOF 4
    get_event(16'd3, 1, '{PT_CALIB}, '{2}, '{2200}, 0);
    check(cal_max == 6000, $sformatf("calibration DAC ramped to its maximum (max %0d)", cal_max));
    reg_write(REG_CTRL, 16'h0000);
    // (5) overflow of a 4-frame front-end FIFO
    busy_seen = 0;
    for (int i = 0; i < 6; i++) pulse(0, 3000 + 10 * i);
    check(busy_seen > 0, "busy raised by full front-end FIFO");
    do_bof();                                    // BOF 5
    get_event(16'd4, 4, '{PT_LASER, PT_LASER, PT_LASER, PT_LASER}, '{0, 0, 0, 0},
              '{3000, 3010, 3020, 3030}, 0);
    repeat (200) @(posedge clk);
    check(!busy, "busy released after readout");
    // (6) framing error latched, sync clears
    check(!error, "no error before broken character");
    @(negedge clk) break_line = 1;
    repeat (CPB * 12) @(negedge clk);
    break_line = 0;
    repeat (CPB * 40) @(negedge clk);
    check(error, "framing error latched");
    @(negedge clk) sync = 1;
    @(negedge clk) sync = 0;
    repeat (2) @(negedge clk);
    check(!error, "sync clears error");
    do_bof();                                    // numbering restarts: BOF 1 after sync
    get_event(16'd0, 0, '{0}, '{0}, '{0}, 0);
    pulse(1, 2600);
    do_bof();
    get_event(16'd1, 1, '{PT_LASER}, '{1}, '{2600}, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
