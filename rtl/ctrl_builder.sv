// ctrl_builder: the controller's "BUILDER FSM", crate-level event building.
//
// It waits until every enabled slot has a complete packet in its receiver FIFO (a record in
// the slot's info FIFO). If all those packets carry the same BOF number it writes one crate
// event into the builder FIFO:
//   {8'hCA, 4'b0, number of boards}, BOF, total words [31:16], total words [15:0]
//   per enabled slot, in slot order: {8'hB0, 4'b0, slot}, length L, status {15'b0, ok},
//                                    then the L words of that board's packet
//   trailer 16'hCAE0 (marked last)
// The total counts every word of the event, header and trailer included. If the BOF numbers
// differ, the packet of the oldest slot is discarded (its words popped) and bof_err pulses;
// the build is retried. Packets of slots that are not enabled are discarded as they arrive,
// so a slot enabled later starts with current data. One word moves per clock; a full builder FIFO stalls the copy.
// The builder FIFO word is 17 bits: bit 16 marks the last word of an event.
// The wait for all boards of one BOF, the parsing of subframes and the push until the last
// board follow the text; the layout of the crate event is this design's choice.
module ctrl_builder
  import daq_pkg::*;
#(
  parameter int unsigned NUM_MB = 12
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NUM_MB-1:0] enable,
  input  logic [NUM_MB-1:0] info_valid,
  input  word_t             info_bof [NUM_MB],
  input  word_t             info_len [NUM_MB],
  input  logic [NUM_MB-1:0] info_ok,
  output logic [NUM_MB-1:0] info_rd,
  input  word_t             rx_data [NUM_MB],
  input  logic [NUM_MB-1:0] rx_empty,
  output logic [NUM_MB-1:0] rx_rd,
  output logic              bf_wr,
  output logic [16:0]       bf_data,
  input  logic              bf_full,
  output logic              evt_done,
  output logic              bof_err
);
  localparam int unsigned SW = $clog2(NUM_MB);

  typedef enum logic [2:0] {S_WAIT, S_CHECK, S_HDR, S_SUB, S_COPY, S_TRAIL, S_DROP} state_e;

  state_e        state;
  logic [SW-1:0] s, ref_s, old_s;
  logic [1:0]    hidx;
  word_t         remaining, ref_bof;
  logic [31:0]   total;
  logic          all_ready, all_same, any_old, any_en, any_dis;
  logic [SW-1:0] dis_s;
  logic [3:0]    nboards;

  always_comb begin
    all_ready = 1'b1;
    any_en    = 1'b0;
    ref_s     = '0;
    nboards   = '0;
    total     = 32'd5;                       // 4 header words + trailer
    for (int i = NUM_MB - 1; i >= 0; i--) begin
      if (enable[i]) begin
        any_en  = 1'b1;
        ref_s   = SW'(i);
        nboards = nboards + 1'b1;
        total   = total + 32'd3 + 32'(info_len[i]);
        if (!info_valid[i]) all_ready = 1'b0;
      end
    end
    any_dis = 1'b0;
    dis_s   = '0;
    for (int i = NUM_MB - 1; i >= 0; i--)
      if (!enable[i] && info_valid[i]) begin any_dis = 1'b1; dis_s = SW'(i); end
    ref_bof  = info_bof[ref_s];
    all_same = 1'b1;
    any_old  = 1'b0;
    old_s    = ref_s;
    for (int i = 0; i < NUM_MB; i++) begin
      if (enable[i] && info_bof[i] != ref_bof) begin
        all_same = 1'b0;
        if (!any_old && (ref_bof - info_bof[i]) < 16'h8000) begin   // slot i is older
          any_old = 1'b1;
          old_s   = SW'(i);
        end
      end
    end
  end

  // next enabled slot after s, or NUM_MB if none
  function automatic logic [SW:0] next_en(input logic [SW-1:0] cur, input logic [NUM_MB-1:0] en);
    next_en = (SW+1)'(NUM_MB);
    for (int i = NUM_MB - 1; i >= 0; i--)
      if (i > int'(cur) && en[i]) next_en = (SW+1)'(i);
  endfunction

  always_comb begin
    bf_wr   = 1'b0;
    bf_data = '0;
    rx_rd   = '0;
    unique case (state)
      S_HDR: begin
        bf_wr = 1'b1;
        unique case (hidx)
          2'd0: bf_data = {1'b0, CR_EVT_MARK, 4'b0, nboards};
          2'd1: bf_data = {1'b0, ref_bof};
          2'd2: bf_data = {1'b0, total[31:16]};
          default: bf_data = {1'b0, total[15:0]};
        endcase
      end
      S_SUB: begin
        bf_wr = 1'b1;
        unique case (hidx)
          2'd0: bf_data = {1'b0, CR_SUB_MARK, 4'b0, 4'(s)};
          2'd1: bf_data = {1'b0, info_len[s]};
          default: bf_data = {1'b0, 15'b0, info_ok[s]};
        endcase
      end
      S_COPY: begin
        bf_wr    = !rx_empty[s];
        bf_data  = {1'b0, rx_data[s]};
        rx_rd[s] = !rx_empty[s] && !bf_full;
      end
      S_TRAIL: begin
        bf_wr   = 1'b1;
        bf_data = {1'b1, CR_TRAILER};
      end
      S_DROP: rx_rd[s] = !rx_empty[s] && remaining != 0;
      default: ;
    endcase
    if (bf_full) bf_wr = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_WAIT; s <= '0; hidx <= '0; remaining <= '0;
      info_rd <= '0; evt_done <= 1'b0; bof_err <= 1'b0;
    end else begin
      info_rd  <= '0;
      evt_done <= 1'b0;
      bof_err  <= 1'b0;
      unique case (state)
        S_WAIT: if (info_rd == '0) begin
          if (any_dis) begin                 // packets of a disabled slot are discarded
            s         <= dis_s;
            remaining <= info_len[dis_s];
            state     <= S_DROP;
          end else if (any_en && all_ready) state <= S_CHECK;
        end
        S_CHECK: begin
          if (all_same) begin
            hidx  <= '0;
            state <= S_HDR;
          end else begin
            s         <= any_old ? old_s : ref_s;
            remaining <= info_len[any_old ? old_s : ref_s];
            bof_err   <= 1'b1;
            state     <= S_DROP;
          end
        end
        S_HDR: if (!bf_full) begin
          if (hidx == 2'd3) begin
            hidx  <= '0;
            s     <= ref_s;
            state <= S_SUB;
          end else hidx <= hidx + 1'b1;
        end
        S_SUB: if (!bf_full) begin
          if (hidx == 2'd2) begin
            hidx      <= '0;
            remaining <= info_len[s];
            state     <= S_COPY;
          end else hidx <= hidx + 1'b1;
        end
        S_COPY: if (!rx_empty[s] && !bf_full) begin
          remaining <= remaining - 1'b1;
          if (remaining == 16'd1) begin
            info_rd[s] <= 1'b1;
            if (next_en(s, enable) == (SW+1)'(NUM_MB)) state <= S_TRAIL;
            else begin
              s     <= SW'(next_en(s, enable));
              state <= S_SUB;
            end
          end
        end
        S_TRAIL: if (!bf_full) begin
          evt_done <= 1'b1;
          state    <= S_WAIT;
        end
        S_DROP: begin
          if (remaining == 0) begin
            info_rd[s] <= 1'b1;
            state      <= S_WAIT;
          end else if (!rx_empty[s]) remaining <= remaining - 1'b1;
        end
        default: state <= S_WAIT;
      endcase
    end
  end
endmodule
