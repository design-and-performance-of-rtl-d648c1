// mb_builder: "Builder logic" of the monitoring-board back-end FPGA: board-level event building.
//
// Each BOF (begin of fill) closes a subcycle. The builder then collects, from the three
// front-end FIFOs in channel order, every frame whose BOF number equals the closed subcycle
// (target), keeps the five pulse words of each and pushes them into the builder FIFO, one
// word per clock (a 16-bit word every 25 ns at 40 MHz). Per channel, the head word of the
// show-ahead FIFO (the frame's BOF number) is checked before the frame is taken:
//   * equal to target: the 11 header words are dropped, the 5 pulse words copied;
//   * older than target (a frame left from an earlier subcycle): the frame is discarded and
//     counted as a BOF mismatch, which raises the board error line;
//   * newer than target: the channel is finished.
// An empty FIFO finishes the channel only once the front end is idle, so a pulse still being
// digitised when the BOF arrived is not lost. When the builder FIFO is full the copy stalls.
// At the end one descriptor {target, number of data words, status} is written for the uplink.
// A BOF arriving during a build is remembered (one deep) and served next.
//
// The BOF-driven readout, the BOF-matching check, the 5 words per pulse and the 25 ns word
// rate follow the text; the older/newer rule and the descriptor are this design's choice.
module mb_builder
  import daq_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,        // BOF: build subcycle `target`
  input  word_t            target,
  input  logic             sync,         // clears the mismatch counter
  // front-end FIFOs
  input  word_t            fe_data [NUM_CH],
  input  logic [NUM_CH-1:0] fe_empty,
  input  logic [NUM_CH-1:0] fe_idle,
  output logic [NUM_CH-1:0] fe_rd,
  // builder FIFO
  output logic             bf_wr,
  output word_t            bf_data,
  input  logic             bf_full,
  // descriptor of a finished event
  output logic             desc_wr,
  output word_t            desc_bof,
  output word_t            desc_count,
  output word_t            desc_status,
  input  logic             desc_full,
  output logic             building,
  output logic [7:0]       mismatches
);
  typedef enum logic [2:0] {S_IDLE, S_HEAD, S_SKIP, S_COPY, S_DROP, S_DESC} state_e;

  state_e      state;
  logic [1:0]  ch;
  logic [4:0]  cnt;
  word_t       tgt, nwords, pend_tgt;
  logic        pend;
  logic        mism_evt;
  word_t       head, diff;

  assign head     = fe_data[ch];
  assign diff     = tgt - head;             // >0 and < 2^15: frame is older than target
  assign building = (state != S_IDLE);

  always_comb begin
    fe_rd   = '0;
    bf_wr   = 1'b0;
    bf_data = fe_data[ch];
    unique case (state)
      S_HEAD:  if (!fe_empty[ch] && head == tgt) fe_rd[ch] = 1'b1;
      S_SKIP:  fe_rd[ch] = !fe_empty[ch];
      S_COPY:  if (!fe_empty[ch] && !bf_full) begin fe_rd[ch] = 1'b1; bf_wr = 1'b1; end
      S_DROP:  fe_rd[ch] = !fe_empty[ch];
      default: ;
    endcase
  end

  assign desc_wr     = (state == S_DESC) && !desc_full;
  assign desc_bof    = tgt;
  assign desc_count  = nwords;
  assign desc_status = {mism_evt, 7'b0, mismatches};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; ch <= '0; cnt <= '0; tgt <= '0; nwords <= '0;
      pend <= 1'b0; pend_tgt <= '0; mism_evt <= 1'b0; mismatches <= '0;
    end else begin
      if (sync) mismatches <= '0;
      if (start && (state != S_IDLE || pend)) begin
        pend     <= 1'b1;
        pend_tgt <= target;
      end
      unique case (state)
        S_IDLE: begin
          if (pend || start) begin
            tgt      <= pend ? pend_tgt : target;
            pend     <= pend && start;       // a simultaneous new BOF stays pending
            if (pend && start) pend_tgt <= target;
            ch       <= '0;
            nwords   <= '0;
            mism_evt <= 1'b0;
            state    <= S_HEAD;
          end
        end
        S_HEAD: begin
          if (fe_empty[ch]) begin
            if (fe_idle[ch]) begin
              if (ch == 2'(NUM_CH - 1)) state <= S_DESC;
              else ch <= ch + 1'b1;
            end
          end else if (head == tgt) begin
            cnt   <= 5'(FE_HDR_WORDS - 2);     // header words still to drop after this one
            state <= S_SKIP;
          end else if (diff != 0 && !diff[15]) begin
            cnt      <= 5'(FE_FRAME_WORDS - 1);
            mism_evt <= 1'b1;
            if (!sync) mismatches <= mismatches + 1'b1;
            state    <= S_DROP;
          end else begin
            if (ch == 2'(NUM_CH - 1)) state <= S_DESC;
            else ch <= ch + 1'b1;
          end
        end
        S_SKIP: if (!fe_empty[ch]) begin
          if (cnt == 0) begin
            cnt   <= 5'(PULSE_WORDS - 1);
            state <= S_COPY;
          end else cnt <= cnt - 1'b1;
        end
        S_COPY: if (!fe_empty[ch] && !bf_full) begin
          nwords <= nwords + 1'b1;
          if (cnt == 0) state <= S_HEAD;
          else cnt <= cnt - 1'b1;
        end
        S_DROP: if (!fe_empty[ch]) begin
          if (cnt == 0) state <= S_HEAD;
          else cnt <= cnt - 1'b1;
        end
        S_DESC: if (!desc_full) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
