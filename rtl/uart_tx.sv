// uart_tx: transmitter of the serial backplane link between a monitoring board and the
// readout controller (one per direction).
//
// The link is an RS-232-like asynchronous line, idle high. Each 16-bit word is sent as two
// characters, high byte first; a character is a start bit (0), eight data bits LSB first and
// one stop bit (1). With the default 40 MHz clock and CLKS_PER_BIT = 4 the line runs at the
// 10 Mbit/s of the original system, i.e. 8 Mbit/s of payload. The character format and the
// byte order are this design's choice; only the RS-232 inspiration and the rate are given.
//
// Interface: valid/ready handshake on word; a word is taken when both are high. ready is high
// while idle and in the last cycle of a word, so a stream of words occupies exactly
// 20 * CLKS_PER_BIT cycles per word on the line.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        valid,
  input  logic [15:0] word,
  output logic        ready,
  output logic        txd
);
  localparam int unsigned CW = (CLKS_PER_BIT > 1) ? $clog2(CLKS_PER_BIT) : 1;

  logic        busy;
  logic [19:0] shreg;      // both characters, LSB goes out first
  logic [4:0]  bits_left;
  logic [CW-1:0] div;

  logic last_tick;

  // the next word may be taken in the last cycle of the current stop bit, so back-to-back
  // words leave no idle gap on the line
  assign last_tick = busy && (div == CW'(CLKS_PER_BIT - 1)) && (bits_left == 5'd1);
  assign ready     = !busy || last_tick;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      shreg     <= '1;
      bits_left <= '0;
      div       <= '0;
      txd       <= 1'b1;
    end else begin
      txd <= busy ? shreg[0] : 1'b1;
      if (ready && valid) begin
        // {stop, lo byte, start, stop, hi byte, start}; bit 0 is sent first
        shreg     <= {1'b1, word[7:0], 1'b0, 1'b1, word[15:8], 1'b0};
        busy      <= 1'b1;
        bits_left <= 5'd20;
        div       <= '0;
      end else if (busy) begin
        if (div == CW'(CLKS_PER_BIT - 1)) begin
          div       <= '0;
          shreg     <= {1'b1, shreg[19:1]};
          bits_left <= bits_left - 1'b1;
          if (bits_left == 5'd1) busy <= 1'b0;
        end else begin
          div <= div + 1'b1;
        end
      end
    end
  end
endmodule
