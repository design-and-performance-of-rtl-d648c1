// tb_mb_uplink: self-checking test of the board's event and reply sender.
// A receiver (uart_rx) decodes the serial line. Two events are queued (12 and 0 data words)
// with a register reply arriving while the first event is being sent. Checks: the 24 header
// words (marker with slot, BOF, count, status, the slow-control layout, configuration and
// control words), the data words in order, the XOR checksum, that the reply packet follows the
// first event and precedes the second, and the line rate of 80 cycles per word.
module tb_mb_uplink;
  import daq_pkg::*;
  logic clk = 0, rst_n = 0;
  logic desc_valid, desc_rd, bf_empty, bf_rd, reply_valid = 0, reply_ack, txd, sending;
  word_t desc_bof, desc_count, desc_status, bf_data;
  word_t slow [NUM_CH][NUM_SLOW];
  word_t config_word = 16'h0001, ctrl_word = 16'h0002, reply_addr = 16'h0007, reply_data = 16'hBEEF;
  logic wv, ferr;
  word_t rw;
  int checks = 0, failures = 0;
  word_t dq [$];
  word_t bq [$];
  word_t rx [$];
  longint cyc = 0, t_first = 0, t_last = 0;

  mb_uplink dut (.clk, .rst_n, .slot(4'd9), .desc_valid, .desc_bof, .desc_count, .desc_status,
    .desc_rd, .bf_data, .bf_empty, .bf_rd, .slow, .config_word, .ctrl_word, .reply_valid,
    .reply_addr, .reply_data, .reply_ack, .txd, .sending);
  uart_rx u_rx (.clk, .rst_n, .rxd(txd), .word_valid(wv), .word(rw), .frame_err(ferr));

  always #5 clk = ~clk;

  assign desc_valid  = dq.size() >= 3;
  assign desc_bof    = desc_valid ? dq[0] : '0;
  assign desc_count  = desc_valid ? dq[1] : '0;
  assign desc_status = desc_valid ? dq[2] : '0;
  assign bf_empty    = bq.size() == 0;
  assign bf_data     = bf_empty ? '0 : bq[0];

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (desc_rd) repeat (3) void'(dq.pop_front());
    if (bf_rd) void'(bq.pop_front());
    if (reply_ack) reply_valid <= 0;
    if (wv) begin
      if (rx.size() == 0) t_first = cyc;
      rx.push_back(rw);
      t_last = cyc;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t hdr(input int i, input word_t b, input word_t n, input word_t st);
    case (i)
      0: return 16'hEB09;
      1: return b;
      2: return n;
      3: return st;
      22: return config_word;
      23: return ctrl_word;
      default:
        if (i < 7) return slow[i - 4][0];
        else if (i < 10) return slow[i - 7][1];
        else if (i < 13) return slow[i - 10][2];
        else return slow[(i - 13) / 3][3 + (i - 13) % 3];
    endcase
  endfunction

  initial begin
    word_t exp_words [$];
    word_t sum;
    for (int c = 0; c < NUM_CH; c++) for (int i = 0; i < NUM_SLOW; i++) slow[c][i] = 16'(c * 16 + i + 16'h100);
    repeat (3) @(posedge clk);
    rst_n = 1;
    // event 1: BOF 0x21, 12 words
    dq.push_back(16'h0021); dq.push_back(16'd12); dq.push_back(16'h8001);
    sum = 0;
    for (int i = 0; i < 24; i++) begin exp_words.push_back(hdr(i, 16'h21, 12, 16'h8001)); sum ^= exp_words[$]; end
    for (int i = 0; i < 12; i++) begin
      word_t w; w = 16'($urandom);
      bq.push_back(w); exp_words.push_back(w); sum ^= w;
    end
    exp_words.push_back(sum);
    // reply arrives while event 1 is sent, event 2 queued too
    repeat (200) @(negedge clk);
    reply_valid = 1;
    dq.push_back(16'h0022); dq.push_back(16'd0); dq.push_back(16'h0000);
    exp_words.push_back(16'h5C09); exp_words.push_back(reply_addr); exp_words.push_back(reply_data);
    sum = 0;
    for (int i = 0; i < 24; i++) begin exp_words.push_back(hdr(i, 16'h22, 0, 0)); sum ^= exp_words[$]; end
    exp_words.push_back(sum);
    wait (rx.size() == exp_words.size());
    repeat (100) @(negedge clk);
    check(rx.size() == 24 + 12 + 1 + 3 + 25, "word count");
    for (int i = 0; i < exp_words.size() && i < rx.size(); i++)
      check(rx[i] == exp_words[i], $sformatf("word %0d", i));
    check(t_last - t_first == 80 * (rx.size() - 1), "80 cycles per word (10 Mbit/s)");
    check(!sending, "idle at end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
