// mb_uplink: sender of the monitoring board toward the readout controller.
//
// It owns the board's transmit line (uart_tx, 10 Mbit/s by default) and sends two kinds of
// packet, never interleaved:
//   * an event, when a descriptor from the builder is waiting: the 24-word header, the data
//     words of the builder FIFO (5 per pulse per channel), and one checksum word, the XOR of
//     all words before it. Header:
//       w0 {8'hEB, 4'b0, slot}   w1 BOF number   w2 number of data words   w3 builder status
//       w4..w6 HV DAC codes   w7..w9 HV voltages   w10..w12 HV currents
//       w13..w21 temperatures (3 per channel: module, preamplifier, ambient)
//       w22 configuration word (SM / LM firmware)   w23 control register
//   * a register reply, when the command decoder has one: {8'h5C, 4'b0, slot}, address, data.
// A reply waiting is sent before the next event starts. The 24-word header of monitoring and
// control information follows the text; its layout and the checksum are this design's choice.
// Interface: desc_valid/desc_rd pop the descriptor FIFO; bf_rd pops the builder FIFO
// (show-ahead); reply_valid is acknowledged by reply_ack.
module mb_uplink
  import daq_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [3:0]  slot,
  input  logic        desc_valid,
  input  word_t       desc_bof,
  input  word_t       desc_count,
  input  word_t       desc_status,
  output logic        desc_rd,
  input  word_t       bf_data,
  input  logic        bf_empty,
  output logic        bf_rd,
  input  word_t       slow [NUM_CH][NUM_SLOW],
  input  word_t       config_word,
  input  word_t       ctrl_word,
  input  logic        reply_valid,
  input  word_t       reply_addr,
  input  word_t       reply_data,
  output logic        reply_ack,
  output logic        txd,
  output logic        sending
);
  typedef enum logic [2:0] {S_IDLE, S_HDR, S_DATA, S_SUM, S_REPLY} state_e;

  state_e state;
  logic   tx_valid, tx_ready;
  word_t  tx_word, sum, hdr_word, remaining;
  logic [4:0] idx;
  word_t  bof_q, cnt_q, stat_q;

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk, .rst_n, .valid(tx_valid), .word(tx_word), .ready(tx_ready), .txd
  );

  always_comb begin
    hdr_word = '0;
    unique case (idx)
      5'd0:  hdr_word = mb_evt_marker(slot);
      5'd1:  hdr_word = bof_q;
      5'd2:  hdr_word = cnt_q;
      5'd3:  hdr_word = stat_q;
      5'd4, 5'd5, 5'd6:    hdr_word = slow[2'(idx - 5'd4)][0];
      5'd7, 5'd8, 5'd9:    hdr_word = slow[2'(idx - 5'd7)][1];
      5'd10, 5'd11, 5'd12: hdr_word = slow[2'(idx - 5'd10)][2];
      5'd13, 5'd14, 5'd15: hdr_word = slow[0][3 + idx - 5'd13];
      5'd16, 5'd17, 5'd18: hdr_word = slow[1][3 + idx - 5'd16];
      5'd19, 5'd20, 5'd21: hdr_word = slow[2][3 + idx - 5'd19];
      5'd22: hdr_word = config_word;
      5'd23: hdr_word = ctrl_word;
      default: hdr_word = '0;
    endcase
  end

  always_comb begin
    tx_valid = 1'b0;
    tx_word  = '0;
    bf_rd    = 1'b0;
    unique case (state)
      S_HDR:   begin tx_valid = 1'b1; tx_word = hdr_word; end
      S_DATA:  begin
        tx_valid = !bf_empty;
        tx_word  = bf_data;
        bf_rd    = tx_ready && !bf_empty;
      end
      S_SUM:   begin tx_valid = 1'b1; tx_word = sum; end
      S_REPLY: begin
        tx_valid = 1'b1;
        tx_word  = (idx == 0) ? {MB_REPLY_MARK, 4'b0, slot} : (idx == 1) ? reply_addr : reply_data;
      end
      default: ;
    endcase
  end

  assign desc_rd   = (state == S_IDLE) && !reply_valid && desc_valid;
  assign reply_ack = (state == S_REPLY) && tx_ready && (idx == 5'd2);
  assign sending   = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; idx <= '0; sum <= '0; remaining <= '0;
      bof_q <= '0; cnt_q <= '0; stat_q <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          idx <= '0;
          sum <= '0;
          if (reply_valid) state <= S_REPLY;
          else if (desc_valid) begin
            bof_q     <= desc_bof;
            cnt_q     <= desc_count;
            stat_q    <= desc_status;
            remaining <= desc_count;
            state     <= S_HDR;
          end
        end
        S_HDR: if (tx_ready) begin
          sum <= sum ^ hdr_word;
          if (idx == 5'(MB_HDR_WORDS - 1)) state <= (remaining == 0) ? S_SUM : S_DATA;
          else idx <= idx + 1'b1;
        end
        S_DATA: if (tx_ready && !bf_empty) begin
          sum       <= sum ^ bf_data;
          remaining <= remaining - 1'b1;
          if (remaining == 16'd1) state <= S_SUM;
        end
        S_SUM: if (tx_ready) state <= S_IDLE;
        S_REPLY: if (tx_ready) begin
          if (idx == 5'd2) state <= S_IDLE;
          else idx <= idx + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
