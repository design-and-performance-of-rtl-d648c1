// usb_fx2_if: the controller's "USB interface FSM", which moves crate events from the builder
// FIFO into the USB microcontroller's slave FIFO (16-bit synchronous write interface of a
// Cypress FX2LP-class device, clocked by the same clock).
//
// While the builder FIFO has data and the device's full flag is not asserted (full_n high),
// one word per clock is driven on fd with slwr_n low; strobe and data come straight from the
// FIFO head, so the flag seen in a cycle governs the write of that cycle. After the last word of an event
// (bit 16 of the builder FIFO word) pktend_n is pulsed low for one clock so the device
// commits a short packet to the host. fifoadr selects the device endpoint FIFO. busy is high
// while full_n is low: this is the controller's own contribution to dead time.
// The USB microcontroller and the FSM name are from the text; the pin-level protocol is the
// usual FX2LP slave-FIFO write cycle and is this design's choice.
module usb_fx2_if
  import daq_pkg::*;
#(
  parameter logic [1:0] EP_ADDR = 2'b10
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [16:0] bf_data,
  input  logic        bf_empty,
  output logic        bf_rd,
  output word_t       fd,
  output logic        slwr_n,
  output logic        pktend_n,
  output logic [1:0]  fifoadr,
  input  logic        full_n,
  output logic        busy,
  output logic [31:0] words_sent
);
  logic end_pending;

  // The write strobe and data are driven combinationally from the show-ahead FIFO head, so a
  // word is written in the same clock in which full_n is seen high.
  assign fifoadr  = EP_ADDR;
  assign busy     = !full_n;
  assign bf_rd    = !bf_empty && full_n && !end_pending;
  assign fd       = bf_data[15:0];
  assign slwr_n   = !bf_rd;
  assign pktend_n = !end_pending;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      end_pending <= 1'b0;
      words_sent  <= '0;
    end else if (end_pending) begin
      end_pending <= 1'b0;
    end else if (bf_rd) begin
      words_sent  <= words_sent + 1'b1;
      end_pending <= bf_data[16];
    end
  end
endmodule
