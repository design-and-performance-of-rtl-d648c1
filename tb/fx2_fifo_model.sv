// fx2_fifo_model: behavioural model of the USB microcontroller's slave FIFO as seen from the
// FPGA, for testbenches. Words written with slwr_n low are collected; pktend_n low closes a
// packet. full_n goes low whenever the testbench sets stall, or for a while after every
// BURST words, so the writer has to wait. Writing while full_n is low is counted as an error.
module fx2_fifo_model #(
  parameter int BURST = 64,
  parameter int HOLD  = 20
) (
  input  logic        clk,
  input  logic [15:0] fd,
  input  logic        slwr_n,
  input  logic        pktend_n,
  input  logic        stall,
  output logic        full_n
);
  logic [15:0] words [$];
  int packets = 0, bad_writes = 0, full_cycles = 0;
  int since = 0, hold = 0;

  initial full_n = 1'b1;

  always @(posedge clk) begin
    if (!slwr_n) begin
      if (!full_n) bad_writes++;
      words.push_back(fd);
      since++;
    end
    if (!pktend_n) packets++;
    if (!full_n) full_cycles++;
    if (since >= BURST) begin since = 0; hold = HOLD; end
    if (hold > 0) hold--;
    full_n <= !(stall || hold > 0);
  end
endmodule
