// tb_ctrl_builder: self-checking test of the crate-level builder FSM with 4 slots.
// Slots 0, 2 and 3 are enabled (slot 1 disabled and always empty). The receiver FIFOs and
// info records are modelled by queues. First the three slots hold packets of BOF 7 (lengths
// 26, 30, 24, slot 2 flagged bad): the crate event must be the 4-word header (board count 3,
// BOF, total length), three subframes (marker with slot, length, status, the packet words)
// and the trailer marked last. Then slot 3 has a stale packet (BOF 6) while the others hold
// BOF 8: it must be discarded (bof_err) and BOF 8 built once slot 3's BOF-8 packet arrives.
// The builder FIFO is randomly full to exercise the stall.
module tb_ctrl_builder;
  import daq_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] enable = 4'b1101, info_valid, info_ok, info_rd, rx_empty, rx_rd;
  word_t info_bof [N], info_len [N], rx_data [N];
  logic bf_wr, bf_full = 0, evt_done, bof_err;
  logic [16:0] bf_data;
  int checks = 0, failures = 0, errs = 0, evts = 0;
  word_t rq [N][$];
  word_t iq_bof [N][$], iq_len [N][$];
  bit iq_ok [N][$];
  logic [16:0] out [$];
  logic [16:0] expo [$];

  ctrl_builder #(.NUM_MB(N)) dut (.*);

  always #5 clk = ~clk;
  always_comb for (int i = 0; i < N; i++) begin
    info_valid[i] = iq_bof[i].size() > 0;
    info_bof[i]   = info_valid[i] ? iq_bof[i][0] : 16'h0;
    info_len[i]   = info_valid[i] ? iq_len[i][0] : 16'h0;
    info_ok[i]    = info_valid[i] ? iq_ok[i][0] : 1'b0;
    rx_empty[i]   = rq[i].size() == 0;
    rx_data[i]    = rx_empty[i] ? 16'h0 : rq[i][0];
  end
  always @(posedge clk) if (rst_n) begin
    if (bf_wr && !bf_full) out.push_back(bf_data);
    if (bof_err) errs++;
    if (evt_done) evts++;
    for (int i = 0; i < N; i++) begin
      if (rx_rd[i]) void'(rq[i].pop_front());
      if (info_rd[i]) begin void'(iq_bof[i].pop_front()); void'(iq_len[i].pop_front()); void'(iq_ok[i].pop_front()); end
    end
  end
  always @(negedge clk) bf_full = ($urandom_range(4) == 0);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // packet of len words for slot s; returns words via expected list when keep
  task automatic pkt(input int s, input int bof, input int len, input bit ok, input bit keep);
    word_t w [$];
    for (int i = 0; i < len; i++) w.push_back(i == 1 ? 16'(bof) : {4'(s), 12'($urandom)});
    foreach (w[i]) rq[s].push_back(w[i]);
    iq_bof[s].push_back(16'(bof)); iq_len[s].push_back(16'(len)); iq_ok[s].push_back(ok);
    if (keep) begin
      expo.push_back({1'b0, CR_SUB_MARK, 4'b0, 4'(s)});
      expo.push_back({1'b0, 16'(len)});
      expo.push_back({1'b0, 15'b0, ok});
      foreach (w[i]) expo.push_back({1'b0, w[i]});
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total;
    repeat (3) @(posedge clk);
    rst_n = 1;
    pkt(0, 7, 26, 1, 1);
    pkt(2, 7, 30, 0, 1);
    pkt(3, 7, 24, 1, 1);
    total = 4 + 3 * 3 + 26 + 30 + 24 + 1;
    expo.push_front({1'b0, 16'(total & 16'hFFFF)});
    expo.push_front({1'b0, 16'(total >> 16)});
    expo.push_front({1'b0, 16'd7});
    expo.push_front({1'b0, CR_EVT_MARK, 4'b0, 4'd3});
    expo.push_back({1'b1, CR_TRAILER});
    wait (evts == 1);
    repeat (3) @(negedge clk);
    check(out.size() == total, "event length equals header total");
    check(out == expo, "crate event words");
    // stale packet in slot 3
    out.delete(); expo.delete();
    pkt(3, 6, 24, 1, 0);
    pkt(0, 8, 25, 1, 1);
    pkt(2, 8, 24, 1, 1);
    repeat (300) @(negedge clk);
    check(errs == 1, "stale packet discarded with bof_err");
    check(rq[3].size() == 0 && iq_bof[3].size() == 0, "stale packet popped");
    check(evts == 1, "no event while slot 3 lacks BOF 8");
    pkt(3, 8, 27, 1, 1);
    total = 4 + 9 + 25 + 24 + 27 + 1;
    expo.push_front({1'b0, 16'(total & 16'hFFFF)});
    expo.push_front({1'b0, 16'(total >> 16)});
    expo.push_front({1'b0, 16'd8});
    expo.push_front({1'b0, CR_EVT_MARK, 4'b0, 4'd3});
    expo.push_back({1'b1, CR_TRAILER});
    wait (evts == 2);
    repeat (3) @(negedge clk);
    check(out == expo, "BOF 8 event");
    check(rq[1].size() == 0, "disabled slot untouched");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
