// tb_readout_controller: the readout controller with 3 board slots and small buffers. Each
// board is modelled by a serial sender fed from a word queue, and answers register reads seen
// on its command line. The USB side is the slave-FIFO model, which stalls now and then.
// Checks: slot enable and run by CPU instructions; BOF broadcast and count; a crate event
// from two enabled boards with the disabled board ignored (header, total, subframes, board
// words, trailer, packet end); a BOF mismatch drops the older board's packet and the next
// matching pair is built; a bad checksum marks the subframe not ok and counts an RX error;
// the RX monitor words; board busy, USB stall and the resulting veto and dead-time counters;
// the error line latch and clear; a board write and a board read through the command lines;
// sync broadcast.
module tb_readout_controller;
  import daq_pkg::*;
  localparam int N = 3, CPB = 4;
  logic clk = 0, rst_n = 0, bof_in = 0;
  logic [N-1:0] mb_rxd, mb_txd, mb_busy = 0;
  logic bof, sync, veto, mb_error = 0;
  logic instr_valid = 0, instr_ready, resp_valid, resp_err;
  instr_t instr;
  word_t resp_data, usb_fd;
  logic usb_slwr_n, usb_pktend_n, usb_full_n, stall = 0;
  logic [1:0] usb_fifoadr;
  int checks = 0, failures = 0, nbof = 0, nsync = 0, veto_cyc = 0, nresp = 0;
  int base_words = 0, base_pkts = 0;
  word_t last_resp;
  bit last_err;
  word_t txq [N][$];
  word_t cmdq [N][$];
  logic [N-1:0] s_valid, s_ready, c_valid;
  word_t s_word [N], c_word [N];

  readout_controller #(.NUM_MB(N), .RX_DEPTH(256), .BF_DEPTH(512), .CLKS_PER_BIT(CPB)) dut (.*);
  fx2_fifo_model #(.BURST(32), .HOLD(10)) u_usb (.clk, .fd(usb_fd), .slwr_n(usb_slwr_n),
    .pktend_n(usb_pktend_n), .stall, .full_n(usb_full_n));

  for (genvar i = 0; i < N; i++) begin : g_mb
    uart_tx #(.CLKS_PER_BIT(CPB)) u_s (.clk, .rst_n, .valid(s_valid[i]), .word(s_word[i]),
                                       .ready(s_ready[i]), .txd(mb_rxd[i]));
    uart_rx #(.CLKS_PER_BIT(CPB)) u_c (.clk, .rst_n, .rxd(mb_txd[i]), .word_valid(c_valid[i]),
                                       .word(c_word[i]), .frame_err());
    // registered view of the queue head, updated after every accepted word
    always @(posedge clk) if (!rst_n) s_valid[i] <= 1'b0;
    else begin
      if (s_valid[i] && s_ready[i]) void'(txq[i].pop_front());
      s_valid[i] <= txq[i].size() > 0;
      s_word[i]  <= (txq[i].size() > 0) ? txq[i][0] : '0;
      if (c_valid[i]) begin
        cmdq[i].push_back(c_word[i]);
        // a board answers a read command with a reply packet
        if (cmdq[i].size() == 2 && cmdq[i][0][15:12] == CMD_READ) begin
          txq[i].push_back({MB_REPLY_MARK, 4'b0, 4'(i)});
          txq[i].push_back({4'b0, cmdq[i][0][11:0]});
          txq[i].push_back(16'hBE00 | 16'(i));
        end
      end
    end
  end

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin
    if (bof) nbof++;
    if (sync) nsync++;
    if (veto) veto_cyc++;
    if (resp_valid) begin last_resp = resp_data; last_err = resp_err; nresp++; end
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


  // queue one board event: n data words; bad = corrupt checksum
  task automatic mb_event(input int s, input word_t bofn, input int n, input bit bad);
    word_t w [$];
    word_t sum = 0;
    w.push_back(mb_evt_marker(4'(s)));
    w.push_back(bofn);
    w.push_back(16'(n));
    for (int i = 3; i < MB_HDR_WORDS; i++) w.push_back(16'(s * 256 + i));
    for (int i = 0; i < n; i++) w.push_back(16'(s * 4096 + bofn * 64 + i));
    foreach (w[i]) sum ^= w[i];
    w.push_back(bad ? ~sum : sum);
    foreach (w[i]) txq[s].push_back(w[i]);
  endtask

  task automatic wait_idle(input int cyc);
    int t = 0;
    while ((txq[0].size() + txq[1].size() + txq[2].size()) > 0 && t < 100000) begin
      @(posedge clk); t++;
    end
    repeat (cyc) @(posedge clk);
  endtask

  // check one crate event from the USB stream; slots 0 and 1, lengths n0 and n1
  task automatic usb_event(input word_t bofn, input int n0, input int n1, input bit ok1);
    int total, p, nw;
    nw = u_usb.words.size() - base_words;
    total = 5 + (3 + 24 + n0) + (3 + 24 + n1);
    check(nw == total, $sformatf("crate event of %0d words, expected %0d", nw, total));
    check(u_usb.packets - base_pkts == 1, "one USB packet per crate event");
    if (nw == total) begin
      p = base_words;
      check(u_usb.words[p] == {CR_EVT_MARK, 4'b0, 4'd2} && u_usb.words[p + 1] == bofn,
            "crate header marker and BOF");
      check({u_usb.words[p + 2], u_usb.words[p + 3]} == 32'(total), "crate total");
      p += 4;
      check(u_usb.words[p] == {CR_SUB_MARK, 8'd0} && u_usb.words[p + 1] == 16'(24 + n0) &&
            u_usb.words[p + 2] == 16'd1, "subframe slot 0");
      check(u_usb.words[p + 3] == mb_evt_marker(0) && u_usb.words[p + 4] == bofn &&
            u_usb.words[p + 3 + 24 + n0 - 1] == 16'(bofn * 64 + n0 - 1), "board 0 words");
      p += 3 + 24 + n0;
      check(u_usb.words[p] == {CR_SUB_MARK, 8'd1} && u_usb.words[p + 2] == 16'(ok1),
            "subframe slot 1");
      check(u_usb.words[p + 3 + 24] == 16'(4096 + bofn * 64), "board 1 first data word");
      p += 3 + 24 + n1;
      check(u_usb.words[p] == CR_TRAILER, "trailer");
    end
    base_words = u_usb.words.size();
    base_pkts  = u_usb.packets;
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v0, d0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    base_words = u_usb.words.size();
    base_pkts  = u_usb.packets;
    exec(OP_WR_INT, 0, CREG_ENABLE, 16'b011);
    exec(OP_WR_INT, 0, CREG_RUN, 16'h1);
    // BOF
    @(negedge clk) bof_in = 1;
    repeat (20) @(negedge clk);
    bof_in = 0;
    repeat (10) @(negedge clk);
    exec(OP_RD_INT, 0, CREG_BOF, 0);
    check(nbof == 1 && last_resp == 1, "BOF broadcast and counted");
    // event of BOF 1 from slots 0 and 1; slot 2 is disabled and sends too
    mb_event(0, 1, 5, 0); mb_event(1, 1, 10, 0); mb_event(2, 1, 5, 0);
    wait_idle(500);
    usb_event(1, 5, 10, 1);
    exec(OP_RD_INT, 0, CREG_EVTS, 0);
    check(last_resp == 1, "event counter");
    exec(OP_RD_INT, 0, CREG_MON, 16'h0100);
    check(last_resp == 16'h0103, "RX monitor word of slot 1");
    // BOF mismatch: slot 0 has BOF 2, slot 1 already BOF 3 -> slot 0 packet dropped
    mb_event(0, 2, 5, 0); mb_event(1, 3, 5, 0);
    wait_idle(300);
    check(u_usb.words.size() == base_words, "mismatched packets not built");
    exec(OP_RD_INT, 0, CREG_ERR, 0);
    check(last_resp[15], "BOF mismatch latched as error");
    exec(OP_ERR_CLR, 0, 0, 0);
    mb_event(0, 3, 15, 0);
    wait_idle(500);
    usb_event(3, 15, 5, 1);
    // bad checksum from slot 1
    mb_event(0, 4, 5, 0); mb_event(1, 4, 5, 1);
    wait_idle(500);
    usb_event(4, 5, 5, 0);
    exec(OP_RD_INT, 0, CREG_RXERR, 16'h0100);
    check(last_resp == 1, "RX error counted for slot 1");
    // USB stall: controller busy, veto and dead time
    v0 = veto_cyc;
    stall = 1;
    mb_event(0, 5, 200, 0); mb_event(1, 5, 200, 0);
    wait_idle(300);
    check(veto_cyc > v0, "veto while USB FIFO full");
    stall = 0;
    repeat (2000) @(posedge clk);
    usb_event(5, 200, 200, 1);
    check(u_usb.bad_writes == 0, "no writes into a full USB FIFO");
    exec(OP_RD_INT, 0, CREG_DT_CTRL + 1, 0);
    d0 = int'(last_resp);
    check(d0 > 0, "controller dead time counted");
    // board busy: enabled slot vetoes, disabled slot does not
    v0 = veto_cyc;
    @(negedge clk) mb_busy = 3'b100;
    repeat (100) @(negedge clk);
    check(veto_cyc == v0, "disabled board busy ignored");
    mb_busy = 3'b001;
    repeat (100) @(negedge clk);
    mb_busy = 0;
    check(veto_cyc - v0 >= 99, "enabled board busy vetoes");
    exec(OP_RD_INT, 0, CREG_DT_MB + 1, 0);
    check(last_resp >= 99 && last_resp <= 105, $sformatf("board dead time %0d", last_resp));
    // error line
    @(negedge clk) mb_error = 1;
    repeat (10) @(negedge clk);
    mb_error = 0;
    exec(OP_RD_INT, 0, CREG_ERR, 0);
    check(last_resp[15] && last_resp[11:0] == 1, "error latched with BOF count");
    exec(OP_ERR_CLR, 0, 0, 0);
    exec(OP_RD_INT, 0, CREG_ERR, 0);
    check(!last_resp[15], "error cleared");
    // board write and read
    exec(OP_WR_MB, 4'd1, 8'h05, 16'h1234);
    repeat (300) @(posedge clk);
    check(cmdq[1].size() == 2 && cmdq[1][0] == {CMD_WRITE, 12'h005} && cmdq[1][1] == 16'h1234,
          "board write on command line");
    exec(OP_RD_MB, 4'd0, 8'h10, 0);
    check(!last_err && last_resp == 16'hBE00, "board read answered");
    check(cmdq[2].size() == 0, "other lines quiet");
    // sync
    exec(OP_SYNC, 0, 0, 0);
    repeat (5) @(posedge clk);
    exec(OP_RD_INT, 0, CREG_BOF, 0);
    check(nsync == 1 && last_resp == 0, "sync broadcast clears BOF count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
