// tb_uart: self-checking loopback test of uart_tx and uart_rx.
// Random words are sent back to back; each must arrive intact, and a word must take
// 20 bit periods (two 8N1 characters) on the line, i.e. 80 cycles at 4 clocks per bit
// (10 Mbit/s at 40 MHz). Then a character with a bad stop bit is forced on the line and the
// receiver must flag frame_err and deliver nothing, and must resynchronise afterwards.
module tb_uart;
  localparam int CPB = 4;
  logic clk = 0, rst_n = 0;
  logic valid = 0, ready, txd, rxd, force_line = 0, forced = 1;
  logic [15:0] word = 0, rword;
  logic wv, ferr;
  int checks = 0, failures = 0;
  logic [15:0] sent [$];
  longint last_rx = -1, cyc = 0;
  int ferrs = 0, got = 0;

  uart_tx #(.CLKS_PER_BIT(CPB)) u_tx (.clk, .rst_n, .valid, .word, .ready, .txd);
  uart_rx #(.CLKS_PER_BIT(CPB)) u_rx (.clk, .rst_n, .rxd, .word_valid(wv), .word(rword), .frame_err(ferr));

  assign rxd = force_line ? forced : txd;
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (ferr) ferrs++;
    if (wv) begin
      got++;
      if (sent.size() == 0) check(0, "unexpected word");
      else check(rword == sent.pop_front(), "word value");
      if (last_rx >= 0 && got > 1 && got <= 40) check(cyc - last_rx == 20 * CPB, "word period 80 cycles");
      last_rx = cyc;
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_char(input logic [7:0] b, input logic stop);
    logic [9:0] f;
    f = {stop, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      forced = f[i];
      repeat (CPB) @(posedge clk);
    end
    forced = 1;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    word = 16'($urandom);
    valid = 1;
    for (int n = 0; n < 40; n++) begin
      @(posedge clk);
      while (!ready) @(posedge clk);
      sent.push_back(word);
      #1;
      word = 16'($urandom);
      if (n == 39) valid = 0;
    end
    wait (sent.size() == 0);
    repeat (200) @(posedge clk);
    check(got == 40, "all 40 words received");
    // bad stop bit on the first character
    force_line = 1;
    send_char(8'hA5, 1'b0);
    repeat (200) @(posedge clk);
    check(ferrs == 1, "frame error flagged");
    check(got == 40, "no word from a bad character");
    // resynchronised: a good word still arrives
    sent.push_back(16'h1234);
    send_char(8'h12, 1'b1);
    send_char(8'h34, 1'b1);
    repeat (50) @(posedge clk);
    check(got == 41, "word after resync");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
