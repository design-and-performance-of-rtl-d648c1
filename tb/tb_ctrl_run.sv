// tb_ctrl_run: self-checking test of BOF distribution, sync, veto, dead time and error latch.
// Checks: each BOF rising edge gives one bof pulse and counts while the run is enabled and
// none while disabled; sync clears the count and is broadcast; veto follows any enabled
// board's busy or the controller busy (a disabled board's busy is ignored); the three
// dead-time counters count exactly the busy cycles driven (board only, controller only,
// overlap); an error edge latches the BOF count and busy lines until cleared.
module tb_ctrl_run;
  import daq_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  logic bof_in = 0, run_en = 0, sync_req = 0, ctrl_busy = 0, error_in = 0, err_clr = 0;
  logic [N-1:0] enable = 4'b0111, mb_busy = 0, err_busy;
  logic bof, sync, veto, err_latched;
  word_t bof_count, err_bof;
  logic [31:0] dt_mb, dt_ctrl, dt_total;
  int checks = 0, failures = 0, nbof = 0, nsync = 0, veto_cyc = 0;

  ctrl_run #(.NUM_MB(N)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin
    if (bof) nbof++;
    if (sync) nsync++;
    if (veto) veto_cyc++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic bof_edge();
    @(negedge clk) bof_in = 1;
    repeat (20) @(negedge clk);
    bof_in = 0;
    repeat (20) @(negedge clk);
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
    bof_edge();
    check(nbof == 0 && bof_count == 0, "no BOF while run disabled");
    run_en = 1;
    repeat (5) bof_edge();
    check(nbof == 5 && bof_count == 5, "five BOFs counted");
    @(negedge clk) sync_req = 1;
    @(negedge clk) sync_req = 0;
    repeat (3) @(negedge clk);
    check(nsync == 1 && bof_count == 0, "sync clears count");
    // dead time: 100 cycles board 1 busy, 50 controller busy, 30 both, disabled board 3 busy
    mb_busy = 4'b1000;
    repeat (40) @(negedge clk);
    check(!veto, "disabled board busy ignored");
    mb_busy = 4'b0010;
    repeat (100) @(negedge clk);
    mb_busy = 0; ctrl_busy = 1;
    repeat (50) @(negedge clk);
    mb_busy = 4'b0001;
    repeat (30) @(negedge clk);
    mb_busy = 0; ctrl_busy = 0;
    repeat (5) @(negedge clk);
    check(dt_mb == 130, "board dead time 130");
    check(dt_ctrl == 80, "controller dead time 80");
    check(dt_total == 180, "total dead time 180");
    check(veto_cyc == 180, "veto for every busy cycle");
    // error latch
    bof_edge(); bof_edge();
    mb_busy = 4'b0100;
    @(negedge clk) error_in = 1;
    repeat (5) @(negedge clk);
    mb_busy = 0;
    check(err_latched && err_bof == 2 && err_busy == 4'b0100, "error latched with BOF and busy lines");
    bof_edge();
    check(err_bof == 2, "latched value held");
    error_in = 0;
    @(negedge clk) err_clr = 1;
    @(negedge clk) err_clr = 0;
    check(!err_latched, "error cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
