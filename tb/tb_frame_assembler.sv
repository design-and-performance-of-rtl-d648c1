// tb_frame_assembler: self-checking test of the front-end frame builder.
// Drives trig, the pulse classification and the measurement result directly, with the two
// arriving in either order, and captures the FIFO writes. Checks every one of the 16 words
// (BOF number, trigger number, slow control, marker, FIFO level, pulse info with type, channel
// and in-subcycle number, timestamp relative to the last BOF, baseline, peak), that the 16
// words are written on consecutive cycles, and that a frame is dropped and counted when the
// FIFO has no room for 16 words.
module tb_frame_assembler;
  import daq_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [1:0] channel = 2'd2;
  logic bof = 0, sync = 0, trig = 0, class_valid = 0, meas_done = 0;
  word_t bof_num = 16'd7;
  word_t slow [NUM_SLOW];
  pulse_type_e ptype = PT_LASER;
  logic [ADC_W-1:0] baseline = 0, peak = 0;
  logic [14:0] fifo_count = 0;
  logic fifo_full = 0, fifo_afull = 0;
  logic wr_en, busy;
  word_t wr_data;
  logic [7:0] dropped;
  int checks = 0, failures = 0;
  word_t got [$];
  longint cyc = 0, first_wr = -1, last_wr = -1;

  frame_assembler dut (.*);

  always #5 clk = ~clk;
  longint bof_cyc = 0, trig_cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (bof || sync) bof_cyc = cyc;
    if (trig) trig_cyc = cyc;
    if (rst_n && wr_en) begin
      got.push_back(wr_data);
      if (first_wr < 0) first_wr = cyc;
      last_wr = cyc;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one pulse; returns the cycle count between BOF and trigger for the timestamp
  task automatic pulse(input pulse_type_e t, input int b, input int p, input bit meas_first,
                       input int n_expect, input int pnum_expect, input bit expect_write);
    got.delete(); first_wr = -1;
    @(negedge clk) trig = 1;
    @(negedge clk) trig = 0;
    repeat (10) @(negedge clk);
    if (meas_first) begin
      meas_done = 1; baseline = 14'(b); peak = 14'(p);
      @(negedge clk) meas_done = 0;
      repeat (3) @(negedge clk);
      class_valid = 1; ptype = t;
      @(negedge clk) class_valid = 0;
    end else begin
      class_valid = 1; ptype = t;
      @(negedge clk) class_valid = 0;
      repeat (3) @(negedge clk);
      meas_done = 1; baseline = 14'(b); peak = 14'(p);
      @(negedge clk) meas_done = 0;
    end
    repeat (25) @(negedge clk);
    if (!expect_write) begin
      check(got.size() == 0, "no words written when FIFO has no room");
      return;
    end
    check(got.size() == 16, "16 words written");
    if (got.size() == 16) begin
      check(last_wr - first_wr == 15, "consecutive writes");
      check(got[0] == bof_num, "w0 BOF number");
      check(got[1] == 16'(n_expect), "w1 trigger number");
      check(got[2][7:0] == dropped, "w2 status");
      for (int i = 0; i < 6; i++) check(got[3 + i] == slow[i], "slow control words");
      check(got[9] == (FE_MARK | 16'(channel)), "w9 marker");
      check(got[10] == 16'(fifo_count), "w10 FIFO level");
      check(got[11] == {t, channel, 12'(pnum_expect)}, "w11 pulse info");
      check({got[12], got[13]} == 32'(trig_cyc - bof_cyc - 1), "w12/13 timestamp");
      check(got[14] == 16'(b), "w14 baseline");
      check(got[15] == 16'(p), "w15 peak");
    end
  endtask

  initial begin
    for (int i = 0; i < NUM_SLOW; i++) slow[i] = 16'h1100 + 16'(i);
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk) bof = 1;
    @(negedge clk) bof = 0;
    pulse(PT_LASER, 1000, 5000, 0, 1, 1, 1);
    pulse(PT_AMERICIUM, 990, 2500, 1, 2, 2, 1);
    // a new BOF resets the in-subcycle number and the timestamp
    bof_num = 16'd8;
    @(negedge clk) bof = 1;
    @(negedge clk) bof = 0;
    repeat (9) @(negedge clk);
    fifo_count = 15'd100;
    pulse(PT_CALIB, 1, 16383, 0, 3, 1, 1);
    // FIFO without room: 16384 - 15 words used
    fifo_count = 15'd16369;
    got.delete();
    pulse(PT_SIM, 3, 4, 0, 4, 2, 0);
    check(dropped == 1, "dropped frame counted");
    // sync clears the trigger number
    @(negedge clk) sync = 1;
    @(negedge clk) sync = 0;
    fifo_count = 15'd0;
    repeat (7) @(negedge clk);
    pulse(PT_SIM, 3, 4, 0, 1, 1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
