// tb_op_decode: self-checking test of the CPU instruction decoder (4 slots).
// Checks: internal register writes (enable mask, run) and reads (BOF count, error, dead-time
// words, RX error and monitor words selected by slot); a board write is handed to the TX
// FSM as {CMD_WRITE, addr} and data and answered with its data; a board read is handed on as
// {CMD_READ, addr}, waits for that slot's reply, returns its data and acknowledges it; a read
// with no reply times out with resp_err; OP_SYNC and OP_ERR_CLR give one-cycle pulses.
module tb_op_decode;
  import daq_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  logic instr_valid = 0, instr_ready, resp_valid, resp_err;
  instr_t instr;
  word_t resp_data;
  logic [N-1:0] enable, reply_valid = 0, reply_ack;
  logic run_en, sync_req, err_clr, err_latched = 1;
  word_t bof_count = 16'd77, err_bof = 16'd12, evt_count = 16'd5;
  logic [31:0] dt_mb = 32'h00010002, dt_ctrl = 32'h00030004, dt_total = 32'h00050006;
  word_t rx_err [N], mon_data [N], reply_data [N];
  logic [4:0] mon_sel;
  logic cmd_valid, cmd_ready = 0;
  logic [3:0] cmd_target;
  word_t cmd_w0, cmd_w1;
  int checks = 0, failures = 0, nsync = 0, nclr = 0, nack = 0;
  word_t last_resp;
  bit last_err;
  int nresp = 0;

  op_decode #(.NUM_MB(N), .TIMEOUT(200)) dut (.*);

  always #5 clk = ~clk;
  always_comb for (int i = 0; i < N; i++) begin
    rx_err[i]   = 16'(i + 10);
    mon_data[i] = {4'(i), 7'b0, mon_sel};
  end
  always @(posedge clk) if (rst_n) begin
    if (sync_req) nsync++;
    if (err_clr) nclr++;
    if (reply_ack[1]) begin nack++; reply_valid[1] <= 0; end
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

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reply_data[1] = 16'h5A5A;
    repeat (3) @(posedge clk);
    rst_n = 1;
    exec(OP_WR_INT, 0, CREG_ENABLE, 16'h000B);
    check(enable == 4'b1011, "enable mask written");
    exec(OP_WR_INT, 0, CREG_RUN, 16'h0001);
    check(run_en, "run enabled");
    exec(OP_RD_INT, 0, CREG_ENABLE, 0);
    check(last_resp == 16'h000B, "enable read back");
    exec(OP_RD_INT, 0, CREG_BOF, 0);
    check(last_resp == 77, "BOF count");
    exec(OP_RD_INT, 0, CREG_ERR, 0);
    check(last_resp == 16'h800C, "error register");
    exec(OP_RD_INT, 0, CREG_DT_TOT + 1, 0);
    check(last_resp == 16'h0006, "dead time low word");
    exec(OP_RD_INT, 0, CREG_DT_CTRL, 0);
    check(last_resp == 16'h0003, "dead time high word");
    exec(OP_RD_INT, 0, CREG_RXERR, 16'h0200);
    check(last_resp == 12, "RX errors of slot 2");
    exec(OP_RD_INT, 0, CREG_MON, 16'h0307);
    check(last_resp == {4'd3, 7'b0, 5'd7}, "monitor word 7 of slot 3");
    exec(OP_RD_INT, 0, CREG_EVTS, 0);
    check(last_resp == 5, "event count");
    // board write: TX FSM accepts after a while
    fork
      begin
        exec(OP_WR_MB, 4'd1, 8'h02, 16'h0777);
      end
      begin
        wait (cmd_valid);
        check(cmd_target == 1 && cmd_w0 == {CMD_WRITE, 4'b0, 8'h02} && cmd_w1 == 16'h0777, "write command");
        repeat (10) @(negedge clk);
        cmd_ready = 1;
        @(negedge clk) cmd_ready = 0;
      end
    join
    check(last_resp == 16'h0777 && !last_err, "write answered");
    // board read with reply
    fork
      exec(OP_RD_MB, 4'd1, 8'h10, 0);
      begin
        wait (cmd_valid);
        check(cmd_w0 == {CMD_READ, 4'b0, 8'h10}, "read command");
        @(negedge clk) cmd_ready = 1;
        @(negedge clk) cmd_ready = 0;
        repeat (30) @(negedge clk);
        reply_valid[1] = 1;
      end
    join
    check(last_resp == 16'h5A5A && !last_err && nack == 1, "read reply returned and acknowledged");
    // board read without reply: timeout
    fork
      exec(OP_RD_MB, 4'd2, 8'h10, 0);
      begin
        wait (cmd_valid);
        @(negedge clk) cmd_ready = 1;
        @(negedge clk) cmd_ready = 0;
      end
    join
    check(last_err, "read timeout flagged");
    exec(OP_SYNC, 0, 0, 0);
    exec(OP_ERR_CLR, 0, 0, 0);
    @(negedge clk);
    check(nsync == 1 && nclr == 1, "sync and error-clear pulses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
