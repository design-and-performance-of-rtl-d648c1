// tb_mb_builder: self-checking test of board-level event building.
// The three front-end FIFOs are modelled as show-ahead queues. Channel 0 holds a stale frame
// (BOF 4), two frames of BOF 5 and one of BOF 6; channel 1 is empty but not idle when the
// build starts and receives its BOF-5 frame later; channel 2 holds one BOF-5 frame. Building
// BOF 5 must output exactly the pulse words (words 11..15) of the four BOF-5 frames in
// channel order, discard the stale frame as one mismatch, leave the BOF-6 frame in place and
// write a descriptor {5, 20 words, mismatch flag}. The builder FIFO is randomly full, so the
// copy stalls; no word may be lost. A second BOF builds BOF 6 (5 words, no mismatch). The
// unstalled copy rate (one word per cycle) is checked on a third build.
module tb_mb_builder;
  import daq_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, sync = 0;
  word_t target = 0;
  word_t fe_data [NUM_CH];
  logic [NUM_CH-1:0] fe_empty, fe_idle, fe_rd;
  logic bf_wr, bf_full = 0, desc_wr, desc_full = 0, building;
  word_t bf_data, desc_bof, desc_count, desc_status;
  logic [7:0] mismatches;
  int checks = 0, failures = 0;
  word_t q [NUM_CH][$];
  word_t out [$];
  word_t exp_out [$];
  word_t d_bof [$], d_cnt [$], d_stat [$];
  bit stall_en = 0;
  int stalls = 0;
  longint cyc = 0, first_wr = 0, last_wr = 0;

  mb_builder dut (.*);

  always #5 clk = ~clk;

  always_comb
    for (int c = 0; c < NUM_CH; c++) begin
      fe_empty[c] = (q[c].size() == 0);
      fe_data[c]  = fe_empty[c] ? 16'hxxxx : q[c][0];
    end

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (bf_wr && !bf_full) begin
      if (out.size() == 0) first_wr = cyc;
      out.push_back(bf_data);
      last_wr = cyc;
    end
    if (bf_full && building) stalls++;
    if (desc_wr) begin d_bof.push_back(desc_bof); d_cnt.push_back(desc_count); d_stat.push_back(desc_status); end
    for (int c = 0; c < NUM_CH; c++) if (fe_rd[c]) begin
      if (q[c].size() == 0) begin checks++; failures++; $display("FAIL read of empty FIFO"); end
      else void'(q[c].pop_front());
    end
  end

  always @(negedge clk) bf_full = stall_en && ($urandom_range(3) == 0);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // push one 16-word frame; pulse words are recorded as expected output if keep
  task automatic frame(input int c, input int bof, input int id, input bit keep);
    q[c].push_back(16'(bof));
    for (int i = 1; i < 16; i++) begin
      word_t w;
      w = {4'(c), 4'(id), 8'(i)};
      q[c].push_back(w);
      if (keep && i >= 11) exp_out.push_back(w);
    end
  endtask

  task automatic bof_pulse(input int t);
    @(negedge clk) begin start = 1; target = 16'(t); end
    @(negedge clk) start = 0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fe_idle = '1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    frame(0, 4, 0, 0);
    frame(0, 5, 1, 1);
    frame(0, 5, 2, 1);
    frame(0, 6, 3, 0);
    frame(2, 5, 4, 1);
    fe_idle[1] = 0;
    stall_en = 1;
    bof_pulse(5);
    repeat (200) @(negedge clk);
    check(building, "waits for channel 1 while not idle");
    // channel 1 frame arrives; its words must come before channel 2's
    begin
      word_t tail [$];
      for (int i = 0; i < 5; i++) tail.push_back(exp_out.pop_back());
      frame(1, 5, 5, 1);
      for (int i = 4; i >= 0; i--) exp_out.push_back(tail[i]);
    end
    fe_idle[1] = 1;
    wait (d_bof.size() == 1);
    @(negedge clk);
    check(out.size() == 20, "20 pulse words");
    check(out == exp_out, "pulse words in channel order");
    check(d_bof[0] == 5 && d_cnt[0] == 20, "descriptor BOF and count");
    check(d_stat[0][15] == 1'b1, "descriptor mismatch flag");
    check(mismatches == 1, "one mismatch");
    check(q[0].size() == 16 && q[0][0] == 16'd6, "BOF-6 frame left in place");
    check(stalls > 0, "builder FIFO full stalled the copy");
    // second build, no stall
    stall_en = 0;
    out.delete(); exp_out.delete();
    for (int i = 11; i < 16; i++) exp_out.push_back({4'd0, 4'd3, 8'(i)});
    bof_pulse(6);
    wait (d_bof.size() == 2);
    @(negedge clk);
    check(out == exp_out, "BOF 6 pulse words");
    check(d_cnt[1] == 5 && d_stat[1][15] == 1'b0, "BOF 6 descriptor");
    // rate: 10 frames of one channel, pulse words must flow at one per clock within a frame
    out.delete();
    for (int k = 0; k < 10; k++) frame(1, 7, k, 1);
    bof_pulse(7);
    wait (d_bof.size() == 3);
    @(negedge clk);
    check(out.size() == 50, "50 words");
    check(last_wr - first_wr == 16 * 9 + 4, "one FIFO word per cycle: 16 cycles per frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
