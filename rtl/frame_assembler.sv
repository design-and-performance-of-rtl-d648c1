// frame_assembler: "Frame Assembling" block of one input slice.
//
// For every pulse validated by a trigger it builds a 16-word frame and writes it, one word
// per cycle, into the front-end FIFO:
//   w0  BOF number at the trigger          w6..w8  temperatures (module, preamp, ambient)
//   w1  trigger number since sync          w9      FE_MARK | channel
//   w2  {full, almost_full, 6'b0, dropped frame count[7:0]}
//   w3  HV DAC code   w4 HV voltage   w5 HV current (slow-control readback)
//   w10 FIFO fill level at the write (the status register, to watch for overflow)
//   w11 pulse info {type[1:0], channel[1:0], pulse number in subcycle[11:0]}
//   w12 timestamp[31:16]  w13 timestamp[15:0]  (clock cycles since the last BOF)
//   w14 baseline average  w15 peak average
// The timestamp counter is cleared by each BOF; the trigger counter and the in-subcycle
// counter are cleared by sync (the in-subcycle counter also by BOF).
//
// The frame is written only when the FIFO has room for all 16 words; otherwise it is dropped
// and counted. Interface: trig (latches timestamp and counters), class_valid/ptype from the
// trigger logic and meas_done/baseline/peak from the ADC readout; the frame is written once
// both have arrived. busy is high from trig until the last word is written.
//
// The 16-word event, the five pulse words and the trigger/BOF numbers and slow control in the
// header follow the text; the word order and the clock-cycle (25 ns) timestamp unit are this
// design's choice (the original timestamp has 10 ns resolution from a faster clock).
module frame_assembler
  import daq_pkg::*;
#(
  parameter int unsigned FIFO_AW = 14
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [1:0]       channel,
  input  logic             bof,          // one-cycle begin-of-fill
  input  logic             sync,         // counter reset
  input  word_t            bof_num,
  input  word_t            slow [NUM_SLOW],
  input  logic             trig,
  input  logic             class_valid,
  input  pulse_type_e      ptype,
  input  logic             meas_done,
  input  logic [ADC_W-1:0] baseline,
  input  logic [ADC_W-1:0] peak,
  input  logic [FIFO_AW:0] fifo_count,
  input  logic             fifo_full,
  input  logic             fifo_afull,
  output logic             wr_en,
  output word_t            wr_data,
  output logic             busy,
  output logic [7:0]       dropped
);
  localparam int unsigned DEPTH = 2 ** FIFO_AW;

  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_WRITE} state_e;

  state_e      state;
  logic [31:0] ts, ts_q;
  word_t       trig_num, bof_q, level_q;
  logic [11:0] pulse_num;
  logic        got_class, got_meas;
  pulse_type_e ptype_q;
  logic [ADC_W-1:0] base_q, peak_q;
  logic [3:0]  widx;
  word_t       frame [FE_FRAME_WORDS];
  logic        room;

  assign room = (fifo_count <= (FIFO_AW+1)'(DEPTH - FE_FRAME_WORDS));
  assign busy = (state != S_IDLE);

  always_comb begin
    frame[0]  = bof_q;
    frame[1]  = trig_num;
    frame[2]  = {fifo_full, fifo_afull, 6'b0, dropped};
    frame[3]  = slow[0];
    frame[4]  = slow[1];
    frame[5]  = slow[2];
    frame[6]  = slow[3];
    frame[7]  = slow[4];
    frame[8]  = slow[5];
    frame[9]  = FE_MARK | word_t'(channel);
    frame[10] = level_q;
    frame[11] = {ptype_q, channel, pulse_num};
    frame[12] = ts_q[31:16];
    frame[13] = ts_q[15:0];
    frame[14] = word_t'(base_q);
    frame[15] = word_t'(peak_q);
  end

  assign wr_data = frame[widx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; ts <= '0; ts_q <= '0; trig_num <= '0; bof_q <= '0; level_q <= '0;
      pulse_num <= '0; got_class <= 1'b0; got_meas <= 1'b0; ptype_q <= PT_LASER;
      base_q <= '0; peak_q <= '0; widx <= '0; wr_en <= 1'b0; dropped <= '0;
    end else begin
      ts <= (bof || sync) ? 32'd0 : ts + 1'b1;
      if (sync) begin
        trig_num  <= '0;
        pulse_num <= '0;
      end else if (bof) begin
        pulse_num <= '0;
      end
      unique case (state)
        S_IDLE: begin
          wr_en <= 1'b0;
          if (trig) begin
            ts_q      <= ts;
            bof_q     <= bof_num;
            got_class <= 1'b0;
            got_meas  <= 1'b0;
            state     <= S_WAIT;
          end
        end
        S_WAIT: begin
          if (class_valid) begin got_class <= 1'b1; ptype_q <= ptype; end
          if (meas_done)   begin got_meas <= 1'b1; base_q <= baseline; peak_q <= peak; end
          if ((got_class || class_valid) && (got_meas || meas_done)) begin
            if (room) begin
              level_q <= word_t'(fifo_count);
              widx    <= '0;
              wr_en   <= 1'b1;
              state   <= S_WRITE;
            end else begin
              dropped <= dropped + 1'b1;
              state   <= S_IDLE;
            end
            if (!sync) begin
              trig_num <= trig_num + 1'b1;
              if (!bof) pulse_num <= pulse_num + 1'b1;
            end
          end
        end
        S_WRITE: begin
          if (widx == 4'(FE_FRAME_WORDS - 1)) begin
            wr_en <= 1'b0;
            state <= S_IDLE;
          end else widx <= widx + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
