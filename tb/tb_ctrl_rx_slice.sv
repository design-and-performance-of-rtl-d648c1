// tb_ctrl_rx_slice: self-checking test of one controller input slice.
// A uart_tx plays the board. Sent in turn: a good event (BOF 3, 10 data words), a register
// reply, an event whose checksum is wrong (BOF 4), and a good event with no data (BOF 5).
// Checks: the receiver FIFO holds the 24+10, 24+10 and 24 words in order; the info FIFO holds
// {3, 34, ok}, {4, 34, bad}, {5, 24, ok}; err_count is 1; the reply is presented with its
// address and data; the monitor registers hold the header words of the last good event.
// Then a packet longer than the receiver FIFO: its record gives the 256 words actually stored
// and is not ok, and the next packet is received intact.
module tb_ctrl_rx_slice;
  import daq_pkg::*;
  logic clk = 0, rst_n = 0;
  logic valid = 0, ready, line;
  word_t word = 0;
  logic rx_rd = 0, rx_empty, info_rd = 0, info_valid, info_ok, reply_valid, reply_ack = 0;
  word_t rx_data, info_bof, info_len, reply_addr, reply_data, mon_data, err_count;
  logic [4:0] mon_sel = 0;
  int checks = 0, failures = 0;
  word_t expq [$];
  word_t last_hdr [24];

  uart_tx u_tx (.clk, .rst_n, .valid, .word, .ready, .txd(line));
  ctrl_rx_slice #(.RX_DEPTH(256)) dut (.clk, .rst_n, .rxd(line), .rx_rd, .rx_data, .rx_empty,
    .info_rd, .info_valid, .info_bof, .info_len, .info_ok, .reply_valid, .reply_addr,
    .reply_data, .reply_ack, .mon_sel, .mon_data, .err_count);

  always #5 clk = ~clk;

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

  task automatic event_pkt(input word_t bof, input int n, input bit corrupt);
    word_t sum, w;
    sum = 0;
    for (int i = 0; i < 24 + n; i++) begin
      if (i == 0) w = 16'hEB02;
      else if (i == 1) w = bof;
      else if (i == 2) w = 16'(n);
      else w = 16'($urandom);
      if (i < 24 && !corrupt) last_hdr[i] = w;
      expq.push_back(w);
      sum ^= w;
      send(w);
    end
    send(corrupt ? ~sum : sum);
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    event_pkt(16'd3, 10, 0);
    send(16'h5C02); send(16'h0004); send(16'hCAFE);
    event_pkt(16'd4, 10, 1);
    event_pkt(16'd5, 0, 0);
    repeat (200) @(negedge clk);
    check(reply_valid && reply_addr == 16'h0004 && reply_data == 16'hCAFE, "register reply");
    @(negedge clk) reply_ack = 1;
    @(negedge clk) reply_ack = 0;
    check(!reply_valid, "reply acknowledged");
    check(err_count == 1, "one integrity error");
    // info records
    check(info_valid && info_bof == 3 && info_len == 34 && info_ok, "info 1");
    @(negedge clk) info_rd = 1; @(negedge clk) info_rd = 0;
    check(info_valid && info_bof == 4 && info_len == 34 && !info_ok, "info 2 bad checksum");
    @(negedge clk) info_rd = 1; @(negedge clk) info_rd = 0;
    check(info_valid && info_bof == 5 && info_len == 24 && info_ok, "info 3");
    @(negedge clk) info_rd = 1; @(negedge clk) info_rd = 0;
    check(!info_valid, "info empty");
    // FIFO contents
    begin
      int n, bad;
      n = 0; bad = 0;
      while (!rx_empty) begin
        if (rx_data != expq[n]) bad++;
        n++;
        @(negedge clk) rx_rd = 1; @(negedge clk) rx_rd = 0;
      end
      if (n != 92 || bad != 0) $display("n=%0d bad=%0d", n, bad);
      check(n == 34 + 34 + 24 && bad == 0, "receiver FIFO words");
    end
    for (int i = 0; i < 21; i++) begin
      mon_sel = 5'(i);
      #1 check(mon_data == last_hdr[i + 3], "monitor word");
    end
    // overflow: a 300-word packet into the 256-word FIFO; the record gives the stored count
    expq.delete();
    event_pkt(16'd6, 276, 0);
    repeat (200) @(negedge clk);
    check(info_valid && info_bof == 6 && info_len == 256 && !info_ok,
          $sformatf("overflowed packet recorded with %0d stored words, not ok", info_len));
    check(err_count == 2, "overflow counted as integrity error");
    begin
      int n;
      n = 0;
      while (!rx_empty && n < 400) begin
        n++;
        @(negedge clk) rx_rd = 1; @(negedge clk) rx_rd = 0;
      end
      check(n == 256, "stored words match the record");
    end
    @(negedge clk) info_rd = 1; @(negedge clk) info_rd = 0;
    // a good packet after the overflow is received intact
    event_pkt(16'd7, 5, 0);
    repeat (200) @(negedge clk);
    check(info_valid && info_bof == 7 && info_len == 29 && info_ok, "packet after overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
