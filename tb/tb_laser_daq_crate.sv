// tb_laser_daq_crate: end-to-end test of one crate: readout controller and two monitoring
// boards, with small buffers, analog front-end models on all six channels, the CPU driving
// instructions and the USB slave-FIFO model collecting crate events.
// The run goes through five BOF subcycles. Every pulse fired is remembered with its board,
// channel, expected type and amplitude, and at the end the USB stream is parsed completely
// (crate header, total, subframes, board headers, checksums are not forwarded, pulse words)
// and each board/channel's pulses are compared in order with what was fired.
// Mechanisms, each counted, and a failure if one never happened: laser, americium,
// calibration and simulation pulses; a calibration ramp on the DAC; HV programming and a
// register read through the command lines; crate events built; a disabled board ignored;
// a BOF mismatch (a slot enabled while its board's packet of an
// older subcycle is still arriving) dropping that packet and latching the error; a full front-end FIFO raising
// busy and the veto blocking triggers; a USB stall making the controller busy; dead-time
// counting; sync clearing the BOF count.
module tb_laser_daq_crate;
  import daq_pkg::*;
  localparam int NB = 2, CPB = 4;
  logic clk = 0, rst_n = 0, bof_in = 0;
  logic [NUM_CH-1:0] th1 [NB], th2 [NB], ph_reset [NB], hv_sclk [NB], hv_mosi [NB], hv_cs_n [NB];
  logic [ADC_W-1:0] adc_data [NB][NUM_CH];
  word_t slow_in [NB][NUM_CH][NUM_SLOW-1];
  logic [CAL_DAC_W-1:0] cal_dac [NB];
  logic instr_valid = 0, instr_ready, resp_valid, resp_err;
  instr_t instr;
  word_t resp_data, usb_fd;
  logic usb_slwr_n, usb_pktend_n, usb_full_n, stall = 0;
  logic [1:0] usb_fifoadr;
  logic veto, mb_error;
  logic [NB-1:0] mb_busy;
  logic fire [NB][NUM_CH];
  logic [13:0] amp [NB][NUM_CH];
  int checks = 0, failures = 0, nresp = 0;
  word_t last_resp;
  bit last_err;
  // expected pulses per board/channel: {type, amplitude}
  int exp_q [NB][NUM_CH][$];
  // mechanism counters
  int n_laser = 0, n_amer = 0, n_calib = 0, n_sim = 0, n_events = 0, n_ramp = 0;
  int n_hv = 0, n_regread = 0, n_disabled = 0, n_mismatch = 0, n_busy = 0, n_blocked = 0;
  int n_stall = 0, n_deadtime = 0, n_sync = 0;
  int cal_peak [NB];

  laser_daq_crate #(.NUM_MB(NB), .FE_FIFO_DEPTH(64), .MB_BF_DEPTH(256), .RX_DEPTH(512),
                    .CR_BF_DEPTH(1024), .CLKS_PER_BIT(CPB)) dut (.*);
  fx2_fifo_model #(.BURST(64), .HOLD(20)) u_usb (.clk, .fd(usb_fd), .slwr_n(usb_slwr_n),
    .pktend_n(usb_pktend_n), .stall, .full_n(usb_full_n));
  for (genvar b = 0; b < NB; b++) begin : g_b
    for (genvar c = 0; c < NUM_CH; c++) begin : g_c
      fe_analog_model u_fe (.clk, .fire(fire[b][c]), .amp(amp[b][c]), .ph_reset(ph_reset[b][c]),
                            .th1(th1[b][c]), .th2(th2[b][c]), .adc_data(adc_data[b][c]));
    end
  end

  always #5 clk = ~clk;
  always_comb for (int b = 0; b < NB; b++) for (int c = 0; c < NUM_CH; c++)
    for (int i = 0; i < NUM_SLOW - 1; i++) slow_in[b][c][i] = 16'(b * 256 + c * 16 + i);
  always @(posedge clk) if (rst_n) begin
    if (resp_valid) begin last_resp = resp_data; last_err = resp_err; nresp++; end
    if (|mb_busy && veto) n_busy++;
    if (!usb_full_n && veto && !(|mb_busy)) n_stall++;
    for (int b = 0; b < NB; b++) if (int'(cal_dac[b]) > cal_peak[b]) cal_peak[b] = int'(cal_dac[b]);
  end

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

  task automatic mb_write(input int b, input logic [11:0] a, input word_t d);
    exec(OP_WR_MB, 4'(b), a[7:0], d);
    repeat (200) @(posedge clk);            // let the board apply it
  endtask

  // fire one pulse; expected: -1 = not expected to be recorded
  task automatic pulse(input int b, input int c, input int a, input int ptype);
    @(negedge clk) begin fire[b][c] = 1; amp[b][c] = 14'(a); end
    @(negedge clk) fire[b][c] = 0;
    if (ptype >= 0) exp_q[b][c].push_back(ptype * 65536 + a);
    repeat (120) @(posedge clk);
  endtask

  task automatic do_bof();
    @(negedge clk) bof_in = 1;
    repeat (10) @(negedge clk);
    bof_in = 0;
  endtask

  task automatic wait_events(input int n);
    int t = 0;
    while (u_usb.packets < n && t < 60000) begin @(posedge clk); t++; end
    check(u_usb.packets >= n, $sformatf("crate event %0d delivered", n));
  endtask

  // parse the whole USB stream
  task automatic parse_usb();
    int p = 0, nwords, nb, total, start, len, n, ok, slot;
    int ptype, ch, a;
    word_t w [$];
    w = u_usb.words;
    nwords = w.size();
    while (p < nwords) begin
      start = p;
      if (w[p][15:8] != CR_EVT_MARK) begin
        check(0, $sformatf("crate marker at word %0d: %h", p, w[p]));
        return;
      end
      nb = int'(w[p][3:0]);
      if (nb < NB) n_disabled++;                  // board 1 was sending but not enabled
      total = int'({w[p + 2], w[p + 3]});
      p += 4;
      for (int k = 0; k < nb; k++) begin
        slot = int'(w[p][3:0]);
        len = int'(w[p + 1]);
        ok = int'(w[p + 2]);
        check(w[p][15:8] == CR_SUB_MARK && ok == 1 && slot < NB, "subframe header");
        check(w[p + 3] == mb_evt_marker(4'(slot)), "board packet marker");
        n = int'(w[p + 5]);
        check(len == MB_HDR_WORDS + n, "subframe length matches board word count");
        check(slot != 0 || w[p + 3 + 4] == 16'h0321, "HV code in board header");
        if (slot == 0 && w[p + 3 + 4] == 16'h0321) n_hv++;
        for (int q = 0; q < n / PULSE_WORDS; q++) begin
          int d = p + 3 + MB_HDR_WORDS + q * PULSE_WORDS;
          ptype = int'(w[d][15:14]);
          ch = int'(w[d][13:12]);
          a = int'(w[d + 4]) - int'(w[d + 3]);
          check(w[d + 3] == 500, "baseline");
          case (ptype)
            0: n_laser++;
            1: n_amer++;
            2: n_calib++;
            default: n_sim++;
          endcase
          if (exp_q[slot][ch].size() == 0) check(0, $sformatf("unexpected pulse b%0d c%0d", slot, ch));
          else begin
            int e = exp_q[slot][ch].pop_front();
            check(ptype == e / 65536 && a == e % 65536,
                  $sformatf("pulse b%0d c%0d type %0d amp %0d, expected %0d %0d",
                            slot, ch, ptype, a, e / 65536, e % 65536));
          end
        end
        p += 3 + len;
      end
      check(w[p] == CR_TRAILER && p - start + 1 == total, "crate trailer and total");
      p++;
      n_events++;
    end
    for (int b = 0; b < NB; b++) for (int c = 0; c < NUM_CH; c++)
      check(exp_q[b][c].size() == 0, $sformatf("all pulses of b%0d c%0d delivered", b, c));
  endtask

  task automatic mech(input int n, input string what);
    checks++;
    $display("mechanism %-34s %0d", what, n);
    if (n == 0) begin failures++; $display("FAIL mechanism never happened: %s", what); end
  endtask

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pk, dt;
    for (int b = 0; b < NB; b++) begin
      cal_peak[b] = 0;
      for (int c = 0; c < NUM_CH; c++) begin fire[b][c] = 0; amp[b][c] = 0; end
    end
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (10) @(posedge clk);
    // drop whatever the model saw while the design was still in reset
    u_usb.words.delete();
    u_usb.packets = 0;
    u_usb.bad_writes = 0;
    repeat (10) @(posedge clk);
    check(u_usb.words.size() == 0 && u_usb.packets == 0, "USB quiet after reset");
    exec(OP_WR_INT, 0, CREG_ENABLE, 16'b01);      // board 1 not yet enabled
    exec(OP_WR_INT, 0, CREG_RUN, 16'h1);
    mb_write(0, REG_HV0, 16'h0321);
    exec(OP_RD_MB, 4'd0, 8'(REG_HV0), 0);
    check(!last_err && last_resp == 16'h0321, "HV register read back from board 0");
    if (!last_err && last_resp == 16'h0321) n_regread++;
    // subcycle 1
    do_bof();
    wait_events(1);                                // BOF 0: board 0 alone, empty
    pulse(0, 0, 3000, PT_LASER);
    pulse(0, 1, 1000, PT_AMERICIUM);
    // board 1 (disabled) gets a longer packet, still on its line when the slot is enabled
    for (int i = 0; i < 3; i++) for (int c = 0; c < NUM_CH; c++) pulse(1, c, 2500, -1);
    do_bof();
    wait_events(2);
    check(u_usb.words[u_usb.words.size() - 1] == CR_TRAILER, "event ends with trailer");
    // subcycle 2: board 1 joins, in simulation mode
    exec(OP_WR_INT, 0, CREG_ENABLE, 16'b11);
    mb_write(1, REG_CTRL, 16'h0002);
    pulse(1, 2, 3000, PT_SIM);
    pulse(0, 2, 4000, PT_LASER);
    do_bof();
    wait_events(3);
    exec(OP_RD_INT, 0, CREG_ERR, 0);
    check(last_resp[15], "stale BOF packets latched the error");
    if (last_resp[15]) n_mismatch++;
    exec(OP_ERR_CLR, 0, 0, 0);
    // subcycle 3: calibration ramp on board 0, overflow on board 1
    mb_write(1, REG_CTRL, 16'h0000);
    mb_write(0, REG_CAL_NWAVE, 16'd3);
    mb_write(0, REG_CAL_STEP, 16'd2500);
    mb_write(0, REG_CAL_GAP, 16'd40);
    mb_write(0, REG_CTRL, 16'h0005);
    pulse(0, 1, 2200, PT_CALIB);
    pulse(1, 1, 3500, PT_LASER);
    for (int i = 0; i < 4; i++) pulse(1, 0, 3000 + 10 * i, PT_LASER);
    check(mb_busy[1] && veto, "full front-end FIFO raises busy and veto");
    for (int i = 0; i < 2; i++) begin
      if (veto) n_blocked++;
      pulse(1, 0, 3100, -1);
    end
    repeat (15000) @(posedge clk);
    if (cal_peak[0] == 6000) n_ramp++;
    mb_write(0, REG_CTRL, 16'h0000);
    // subcycle 4: USB stalled while the event arrives
    stall = 1;
    do_bof();
    repeat (12000) @(posedge clk);
    stall = 0;
    wait_events(4);
    check(!mb_busy[1], "busy released after readout");
    exec(OP_RD_INT, 0, CREG_DT_MB + 1, 0);
    dt = int'(last_resp);
    exec(OP_RD_INT, 0, CREG_DT_CTRL + 1, 0);
    if (dt > 0 && last_resp > 0) n_deadtime++;
    // subcycle 5: last BOF, then sync
    pulse(0, 0, 2800, PT_LASER);
    pulse(1, 1, 900, PT_AMERICIUM);
    do_bof();
    wait_events(5);
    exec(OP_RD_INT, 0, CREG_BOF, 0);
    pk = int'(last_resp);
    exec(OP_SYNC, 0, 0, 0);
    exec(OP_RD_INT, 0, CREG_BOF, 0);
    if (pk == 5 && last_resp == 0) n_sync++;
    exec(OP_RD_INT, 0, CREG_EVTS, 0);
    check(u_usb.bad_writes == 0, "no writes into a full USB FIFO");
    parse_usb();
    mech(n_laser, "laser pulses");
    mech(n_amer, "americium pulses");
    mech(n_calib, "calibration pulses");
    mech(n_sim, "simulation pulses");
    mech(n_ramp, "calibration DAC ramp");
    mech(n_hv, "HV code programmed and reported");
    mech(n_regread, "board register read");
    mech(n_events, "crate events built");
    mech(n_disabled, "disabled board ignored");
    mech(n_mismatch, "BOF mismatch latched error");
    mech(n_busy, "board busy veto cycles");
    mech(n_blocked, "triggers blocked by veto");
    mech(n_stall, "USB stall veto cycles");
    mech(n_deadtime, "dead time counted");
    mech(n_sync, "sync cleared BOF count");
    check(n_events == 5, $sformatf("%0d crate events", n_events));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
