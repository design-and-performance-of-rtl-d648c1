// tb_ctrl_tx: self-checking test of the TX FSM and the per-slot transmitters (4 slots).
// A uart_rx listens on every slot line. A command to slot 2 must reach slot 2 only, as the
// two words {opcode, address} and data; a broadcast (target 15) must reach every enabled
// slot (0, 1, 3) and not the disabled slot 2; cmd_ready must be low while sending.
module tb_ctrl_tx;
  import daq_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] enable = 4'b1111, txd, wv, ferr;
  logic cmd_valid = 0, cmd_ready;
  logic [3:0] cmd_target = 0;
  word_t cmd_w0 = 0, cmd_w1 = 0;
  word_t rw [N];
  int checks = 0, failures = 0;
  word_t got [N][$];

  ctrl_tx #(.NUM_MB(N)) dut (.*);
  for (genvar i = 0; i < N; i++) begin : g_rx
    uart_rx u_rx (.clk, .rst_n, .rxd(txd[i]), .word_valid(wv[i]), .word(rw[i]), .frame_err(ferr[i]));
  end

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) for (int i = 0; i < N; i++) if (wv[i]) got[i].push_back(rw[i]);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic issue(input logic [3:0] t, input word_t a, input word_t b);
    @(negedge clk) begin cmd_valid = 1; cmd_target = t; cmd_w0 = a; cmd_w1 = b; end
    @(posedge clk);
    while (!cmd_ready) @(posedge clk);
    #1 cmd_valid = 0;
    repeat (5) @(negedge clk);
    check(!cmd_ready, "busy while sending");
    repeat (300) @(negedge clk);
    check(cmd_ready, "ready after sending");
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    issue(4'd2, 16'h1003, 16'h0ABC);
    check(got[2].size() == 2 && got[2][0] == 16'h1003 && got[2][1] == 16'h0ABC, "slot 2 command");
    check(got[0].size() == 0 && got[1].size() == 0 && got[3].size() == 0, "other slots silent");
    enable = 4'b1011;
    issue(4'hF, 16'h2010, 16'h0000);
    for (int i = 0; i < N; i++)
      if (i == 2) check(got[i].size() == 2, "disabled slot not broadcast to");
      else check(got[i].size() == 2 && got[i][0] == 16'h2010, "broadcast reached enabled slot");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
