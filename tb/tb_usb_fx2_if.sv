// tb_usb_fx2_if: self-checking test of the USB interface FSM.
// The builder FIFO is a queue of three events (100, 40 and 7 words, last word flagged). The
// USB device model deasserts full_n after every 32 words. Checks: every word reaches the
// device in order, no write happens while full_n is low, one packet end per event, busy
// equals !full_n every cycle, and a 32-word burst takes 32 consecutive cycles.
module tb_usb_fx2_if;
  import daq_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [16:0] bf_data;
  logic bf_empty, bf_rd, slwr_n, pktend_n, full_n, busy, stall = 0;
  word_t fd;
  logic [1:0] fifoadr;
  logic [31:0] words_sent;
  int checks = 0, failures = 0;
  logic [16:0] q [$];
  word_t expw [$];
  longint cyc = 0, t0 = 0, t1 = 0;

  usb_fx2_if dut (.*);
  fx2_fifo_model #(.BURST(32), .HOLD(10)) dev (.clk, .fd, .slwr_n, .pktend_n, .stall, .full_n);

  always #5 clk = ~clk;
  assign bf_empty = q.size() == 0;
  assign bf_data  = bf_empty ? '0 : q[0];
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (bf_rd) void'(q.pop_front());
    if (!slwr_n) begin
      if (t0 == 0) t0 = cyc;
      if (dev.words.size() == 31 && t1 == 0) t1 = cyc;
    end
    checks++;
    if (busy != !full_n) failures++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic evt(input int n);
    for (int i = 0; i < n; i++) begin
      word_t w; w = 16'($urandom);
      q.push_back({i == n - 1, w});
      expw.push_back(w);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int p0;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    p0 = dev.packets;
    dev.words.delete();
    evt(100); evt(40); evt(7);
    wait (q.size() == 0);
    repeat (20) @(negedge clk);
    check(dev.words.size() == 147, "all words delivered");
    check(dev.words == expw, "words in order");
    check(dev.packets - p0 == 3, "one packet end per event");
    check(dev.full_cycles > 0, "device was full at times");
    check(fifoadr == 2'b10, "endpoint address");
    check(words_sent == 147, "word counter");
    check(t1 - t0 == 31, "first 32 words on consecutive cycles");
    $display("writes while full: %0d", dev.bad_writes);
    check(dev.bad_writes == 0, "no write while full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
