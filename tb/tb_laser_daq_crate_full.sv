// tb_laser_daq_crate_full: the crate at its default size (12 monitoring boards, full-size
// FIFOs, 10 Mbit/s backplane links), taken through one complete operation: the CPU enables
// all slots and the run, programs an HV code on one board, a BOF opens a subcycle in which
// every board sees pulses on its channels (laser on all, americium on some), the next BOF
// builds the event, and the crate event must arrive whole at the USB slave FIFO: 12
// subframes in slot order, each with the right board packet, every pulse's type, baseline
// and peak, the total and the trailer. The boards' event transfers run in parallel on their
// own lines, so one subcycle reads out in about the time of the longest board packet.
module tb_laser_daq_crate_full;
  import daq_pkg::*;
  localparam int NB = 12;
  logic clk = 0, rst_n = 0, bof_in = 0;
  logic [NUM_CH-1:0] th1 [NB], th2 [NB], ph_reset [NB], hv_sclk [NB], hv_mosi [NB], hv_cs_n [NB];
  logic [ADC_W-1:0] adc_data [NB][NUM_CH];
  word_t slow_in [NB][NUM_CH][NUM_SLOW-1];
  logic [CAL_DAC_W-1:0] cal_dac [NB];
  logic instr_valid = 0, instr_ready, resp_valid, resp_err;
  instr_t instr;
  word_t resp_data, usb_fd;
  logic usb_slwr_n, usb_pktend_n, usb_full_n;
  logic [1:0] usb_fifoadr;
  logic veto, mb_error;
  logic [NB-1:0] mb_busy;
  logic fire [NB][NUM_CH];
  logic [13:0] amp [NB][NUM_CH];
  int checks = 0, failures = 0, nresp = 0;
  word_t last_resp;
  int exp_q [NB][NUM_CH][$];

  laser_daq_crate dut (.*);
  fx2_fifo_model #(.BURST(256), .HOLD(10)) u_usb (.clk, .fd(usb_fd), .slwr_n(usb_slwr_n),
    .pktend_n(usb_pktend_n), .stall(1'b0), .full_n(usb_full_n));
  for (genvar b = 0; b < NB; b++) begin : g_b
    for (genvar c = 0; c < NUM_CH; c++) begin : g_c
      fe_analog_model u_fe (.clk, .fire(fire[b][c]), .amp(amp[b][c]), .ph_reset(ph_reset[b][c]),
                            .th1(th1[b][c]), .th2(th2[b][c]), .adc_data(adc_data[b][c]));
    end
  end

  always #5 clk = ~clk;
  always_comb for (int b = 0; b < NB; b++) for (int c = 0; c < NUM_CH; c++)
    for (int i = 0; i < NUM_SLOW - 1; i++) slow_in[b][c][i] = 16'(b * 256 + c * 16 + i);
  always @(posedge clk) if (rst_n && resp_valid) begin last_resp = resp_data; nresp++; end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic exec(input op_e op, input logic [3:0] t, input logic [7:0] a, input word_t d);
    int n0;
    n0 = nresp;
    @(negedge clk) begin instr_valid = 1; instr = '{op: op, target: t, addr: a, data: d}; end
    @(posedge clk);
    while (!instr_ready) @(posedge clk);
    #1 instr_valid = 0;
    while (nresp == n0) @(negedge clk);
  endtask

  task automatic do_bof();
    @(negedge clk) bof_in = 1;
    repeat (10) @(negedge clk);
    bof_in = 0;
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p, nb, total, len, n, slot, t, c, d, ch, got;
    word_t w [$];
    for (int b = 0; b < NB; b++) for (int c = 0; c < NUM_CH; c++) begin
      fire[b][c] = 0; amp[b][c] = 0;
    end
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (10) @(posedge clk);
    u_usb.words.delete();
    u_usb.packets = 0;
    u_usb.bad_writes = 0;
    exec(OP_WR_INT, 0, CREG_ENABLE, 16'h0FFF);
    exec(OP_WR_INT, 0, CREG_RUN, 16'h1);
    exec(OP_WR_MB, 4'd7, 8'(REG_HV0 + 2), 16'h0ABC);
    do_bof();                                    // BOF 1 opens; BOF 0 (empty) is read out
    t = 0;
    while (u_usb.packets < 1 && t < 50000) begin @(posedge clk); t++; end
    check(u_usb.packets == 1, "empty event of BOF 0");
    u_usb.words.delete();
    // pulses: board b fires 1 + b%3 laser pulses on channel b%3, americium on channel 0 of
    // every fourth board; all channels of a board fire together
    for (int k = 0; k < 3; k++) begin
      @(negedge clk);
      for (int b = 0; b < NB; b++) begin
        c = b % 3;
        if (k <= c) begin
          fire[b][c] = 1; amp[b][c] = 14'(2100 + 100 * b + 10 * k);
          exp_q[b][c].push_back(2100 + 100 * b + 10 * k);
        end
        if (k == 0 && b % 4 == 0 && c != 0) begin
          fire[b][0] = 1; amp[b][0] = 14'(600 + b);
          exp_q[b][0].push_back(65536 + 600 + b);
        end
      end
      @(negedge clk);
      for (int b = 0; b < NB; b++) for (int c = 0; c < NUM_CH; c++) fire[b][c] = 0;
      repeat (150) @(posedge clk);
    end
    do_bof();                                    // BOF 2: event of BOF 1 built
    t = 0;
    while (u_usb.packets < 2 && t < 100000) begin @(posedge clk); t++; end
    check(u_usb.packets == 2, "crate event of BOF 1 delivered");
    $display("crate event delivered %0d cycles after the BOF", t);
    w = u_usb.words;
    p = 0;
    nb = int'(w[0][3:0]);
    total = int'({w[2], w[3]});
    check(w[0][15:8] == CR_EVT_MARK && nb == NB && w[1] == 1, "crate header");
    check(total == w.size(), $sformatf("total %0d against %0d words", total, w.size()));
    p = 4;
    for (int k = 0; k < nb && p < w.size(); k++) begin
      slot = int'(w[p][3:0]);
      len = int'(w[p + 1]);
      n = int'(w[p + 5]);
      check(slot == k && w[p + 2] == 1 && len == MB_HDR_WORDS + n, $sformatf("subframe %0d", k));
      check(w[p + 4] == 1, "board BOF");
      if (k == 7) check(w[p + 3 + 6] == 16'h0ABC, "HV code programmed on board 7");
      for (int q = 0; q < n / PULSE_WORDS; q++) begin
        d = p + 3 + MB_HDR_WORDS + q * PULSE_WORDS;
        ch = int'(w[d][13:12]);
        got = int'(w[d][15:14]) * 65536 + int'(w[d + 4]) - int'(w[d + 3]);
        check(w[d + 3] == 500, "baseline");
        if (exp_q[slot][ch].size() == 0) check(0, "unexpected pulse");
        else check(exp_q[slot][ch].pop_front() == got, $sformatf("pulse b%0d c%0d", slot, ch));
      end
      p += 3 + len;
    end
    check(p < w.size() && w[p] == CR_TRAILER, "trailer");
    for (int b = 0; b < NB; b++) for (int c = 0; c < NUM_CH; c++)
      check(exp_q[b][c].size() == 0, "all pulses delivered");
    check(u_usb.bad_writes == 0 && !mb_error, "no errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
