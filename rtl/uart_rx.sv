// uart_rx: receiver of the serial backplane link (see uart_tx for the line format).
//
// The line is synchronised by two flip-flops. A falling edge starts a character; each bit is
// sampled in the middle of its period. Two characters make a word, high byte first. A missing
// stop bit raises frame_err for one cycle and drops the half-received word. If the line stays
// idle for more than 16 bit periods between the two characters the byte phase is reset, so
// the receiver resynchronises to word boundaries after any disturbance.
//
// Interface: word_valid pulses for one cycle with word; frame_err pulses on a bad stop bit.
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        rxd,
  output logic        word_valid,
  output logic [15:0] word,
  output logic        frame_err
);
  localparam int unsigned CW = $clog2(CLKS_PER_BIT * 16 + 1);

  typedef enum logic [1:0] {S_IDLE, S_START, S_DATA, S_STOP} state_e;

  state_e      state;
  logic [1:0]  sync;
  logic [CW-1:0] div;
  logic [2:0]  bitn;
  logic [7:0]  sh;
  logic        have_hi;
  logic [7:0]  hi;
  logic [CW-1:0] idle_cnt;
  logic        rx;

  assign rx = sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync       <= 2'b11;
      state      <= S_IDLE;
      div        <= '0;
      bitn       <= '0;
      sh         <= '0;
      have_hi    <= 1'b0;
      hi         <= '0;
      idle_cnt   <= '0;
      word_valid <= 1'b0;
      word       <= '0;
      frame_err  <= 1'b0;
    end else begin
      sync       <= {sync[0], rxd};
      word_valid <= 1'b0;
      frame_err  <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (!rx) begin
            state    <= S_START;
            div      <= '0;
            idle_cnt <= '0;
          end else if (have_hi) begin
            if (idle_cnt == CW'(CLKS_PER_BIT * 16)) have_hi <= 1'b0;
            else idle_cnt <= idle_cnt + 1'b1;
          end
        end
        S_START: begin
          // middle of the start bit
          if (div == CW'(CLKS_PER_BIT / 2 - 1)) begin
            div <= '0;
            if (!rx) begin
              state <= S_DATA;
              bitn  <= '0;
            end else begin
              state <= S_IDLE;   // glitch
            end
          end else div <= div + 1'b1;
        end
        S_DATA: begin
          if (div == CW'(CLKS_PER_BIT - 1)) begin
            div <= '0;
            sh  <= {rx, sh[7:1]};
            if (bitn == 3'd7) state <= S_STOP;
            bitn <= bitn + 1'b1;
          end else div <= div + 1'b1;
        end
        S_STOP: begin
          if (div == CW'(CLKS_PER_BIT - 1)) begin
            div   <= '0;
            state <= S_IDLE;
            if (!rx) begin
              frame_err <= 1'b1;
              have_hi   <= 1'b0;
            end else if (!have_hi) begin
              hi      <= sh;
              have_hi <= 1'b1;
            end else begin
              word       <= {hi, sh};
              word_valid <= 1'b1;
              have_hi    <= 1'b0;
            end
          end else div <= div + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
