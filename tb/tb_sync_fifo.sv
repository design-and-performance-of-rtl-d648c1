// tb_sync_fifo: self-checking test of sync_fifo (show-ahead FIFO).
// Random pushes and pops against a queue reference model; checks head word, empty, full,
// count and almost_full every cycle, including pushes into a full FIFO (ignored) and the
// one-cycle latency from push to visible head.
module tb_sync_fifo;
  localparam int DEPTH = 16;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0;
  logic [15:0] wr_data = 0, rd_data;
  logic empty, full, afull;
  logic [4:0] count;
  int checks = 0, failures = 0;
  logic [15:0] model [$];
  int fills = 0;

  sync_fifo #(.WIDTH(16), .DEPTH(DEPTH), .AFULL(12)) dut (
    .clk, .rst_n, .wr_en, .wr_data, .rd_en, .rd_data, .empty, .full, .almost_full(afull), .count
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      // phases: fill-heavy, drain-heavy, mixed
      int pw;
      pw = ((cyc / 500) % 2 == 0) ? 80 : 30;
      @(negedge clk);
      check(empty == (model.size() == 0), "empty");
      check(full == (model.size() == DEPTH), "full");
      check(count == 5'(model.size()), "count");
      check(afull == (model.size() >= 12), "almost_full");
      if (model.size() > 0) check(rd_data == model[0], "head word");
      wr_en = ($urandom_range(99) < pw) && !full;
      rd_en = ($urandom_range(99) >= pw) && !empty;
      wr_data = 16'($urandom);
      @(posedge clk);
      #1;
      if (rd_en && model.size() > 0) void'(model.pop_front());
      if (wr_en && model.size() < DEPTH + (rd_en ? 1 : 0)) model.push_back(wr_data);
      if (model.size() == DEPTH) fills++;
    end
    check(fills > 0, "FIFO reached full at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
