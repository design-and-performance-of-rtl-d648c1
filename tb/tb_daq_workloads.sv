// tb_daq_workloads: the crate at its default size, run at the pulse loads of the laser
// firing programs: 20 pulses per channel per subcycle (standard program), 100 (physics
// simulation mode) and 210 (the largest load measured on the local-monitor crate), with 8 of
// the 12 slots enabled as in the local-monitor crate. For each load every enabled board's
// channels see N pulses, then a BOF closes the subcycle, and the test checks:
//   * the crate event reaches the USB port within one 10 ms subcycle (400,000 cycles) of the
//     BOF, so the next subcycle's readout is not delayed;
//   * it holds 8 subframes, each with 24 + 15 N words, every pulse with the right type,
//     channel, baseline and peak, and timestamps rising within a channel;
//   * no board was ever busy and the board dead-time counter stayed 0 (the USB model's
//     periodic full flag does give some controller dead time);
// and prints the per-board line rate and the USB byte rate reached.
module tb_daq_workloads;
  import daq_pkg::*;
  localparam int NB = 12, NEN = 8;
  localparam int LOADS [3] = '{20, 100, 210};
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
  int checks = 0, failures = 0, nresp = 0, busy_cyc = 0;
  word_t last_resp;

  laser_daq_crate dut (.*);
  fx2_fifo_model #(.BURST(512), .HOLD(8)) u_usb (.clk, .fd(usb_fd), .slwr_n(usb_slwr_n),
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
  always @(posedge clk) if (rst_n) begin
    if (resp_valid) begin last_resp = resp_data; nresp++; end
    if (|mb_busy) busy_cyc++;
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

  // BOF, then wait for the crate event; returns cycles from BOF to the packet end
  task automatic bof_and_wait(output int cyc);
    int p0;
    p0 = u_usb.packets;
    cyc = 0;
    @(negedge clk) bof_in = 1;
    repeat (10) @(negedge clk);
    bof_in = 0;
    cyc = 10;
    while (u_usb.packets == p0 && cyc < 500000) begin @(posedge clk); cyc++; end
    check(u_usb.packets == p0 + 1, "crate event delivered");
  endtask

  function automatic int amp_of(input int b, input int c);
    return 2100 + 100 * b + 10 * c;
  endfunction

  task automatic check_event(input int n, input word_t bofn);
    int p, len, slot, nd, d, ts, last_ts;
    word_t w [$];
    w = u_usb.words;
    check(w.size() == 5 + NEN * (3 + MB_HDR_WORDS + PULSE_WORDS * NUM_CH * n),
          $sformatf("crate event size %0d", w.size()));
    check(w[0] == {CR_EVT_MARK, 4'b0, 4'(NEN)} && w[1] == bofn, "crate header");
    p = 4;
    for (int k = 0; k < NEN && p + 5 < w.size(); k++) begin
      slot = int'(w[p][3:0]);
      len = int'(w[p + 1]);
      nd = int'(w[p + 5]);
      check(slot == k && w[p + 2] == 1 && w[p + 4] == bofn && nd == PULSE_WORDS * NUM_CH * n,
            $sformatf("subframe of slot %0d: %0d data words", k, nd));
      for (int c = 0; c < NUM_CH; c++) begin
        int bad = 0;
        last_ts = -1;
        for (int q = 0; q < n; q++) begin
          d = p + 3 + MB_HDR_WORDS + (c * n + q) * PULSE_WORDS;
          if (d + 4 >= w.size()) begin bad++; break; end
          ts = int'({w[d + 1], w[d + 2]});
          if (w[d][15:14] != 2'(PT_LASER) || int'(w[d][13:12]) != c || w[d + 3] != 500 ||
              int'(w[d + 4]) != 500 + amp_of(slot, c) || ts <= last_ts) bad++;
          last_ts = ts;
        end
        check(bad == 0, $sformatf("pulses of slot %0d channel %0d (%0d bad)", k, c, bad));
      end
      p += 3 + len;
    end
    check(p < w.size() && w[p] == CR_TRAILER, "trailer");
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, bofn, words;
    for (int b = 0; b < NB; b++) for (int c = 0; c < NUM_CH; c++) begin
      fire[b][c] = 0; amp[b][c] = 14'(amp_of(b, c));
    end
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (10) @(posedge clk);
    u_usb.words.delete();
    u_usb.packets = 0;
    u_usb.bad_writes = 0;
    exec(OP_WR_INT, 0, CREG_ENABLE, 16'((1 << NEN) - 1));
    exec(OP_WR_INT, 0, CREG_RUN, 16'h1);
    bof_and_wait(cyc);                           // opens subcycle 1, empty event of BOF 0
    bofn = 1;
    busy_cyc = 0;
    foreach (LOADS[i]) begin
      u_usb.words.delete();
      for (int k = 0; k < LOADS[i]; k++) begin
        @(negedge clk);
        for (int b = 0; b < NEN; b++) for (int c = 0; c < NUM_CH; c++) fire[b][c] = 1;
        @(negedge clk);
        for (int b = 0; b < NEN; b++) for (int c = 0; c < NUM_CH; c++) fire[b][c] = 0;
        repeat (98) @(posedge clk);
      end
      bof_and_wait(cyc);
      check(cyc < 400000, $sformatf("%0d pulses: readout takes %0d cycles, within 10 ms", LOADS[i], cyc));
      words = MB_HDR_WORDS + PULSE_WORDS * NUM_CH * LOADS[i] + 1;
      $display("load %0d pulses/channel: board event %0d words, crate event %0d words, delivered %0d cycles (%0d us) after the BOF; line rate per board %0d kbit/s per 10 ms subcycle, USB %0d kbyte/s",
               LOADS[i], words, u_usb.words.size(), cyc, cyc / 40, words * 20 / 10,
               u_usb.words.size() * 2 / 10);
      check_event(LOADS[i], 16'(bofn));
      bofn++;
    end
    exec(OP_RD_INT, 0, CREG_DT_MB + 1, 0);
    check(last_resp == 0 && busy_cyc == 0, "no board dead time at these loads");
    check(u_usb.bad_writes == 0 && !mb_error, "no errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
