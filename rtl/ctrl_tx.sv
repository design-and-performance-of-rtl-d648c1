// ctrl_tx: the controller's "TX FSM" and its twelve "TX-logic" serial transmitters, which send
// commands and requests to the monitoring boards.
//
// A command is two words, {opcode, address} and data (see mb_cmd). It is sent to one slot or,
// with target 4'hF, to every enabled slot at once; each slot has its own uart_tx on its own
// backplane line. cmd_ready is high when no transmitter is busy and no command is in flight.
// The twelve transmitters and the FSM are from the text; the command format is this design's
// choice.
module ctrl_tx
  import daq_pkg::*;
#(
  parameter int unsigned NUM_MB       = 12,
  parameter int unsigned CLKS_PER_BIT = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NUM_MB-1:0] enable,
  input  logic              cmd_valid,
  input  logic [3:0]        cmd_target,
  input  word_t             cmd_w0,
  input  word_t             cmd_w1,
  output logic              cmd_ready,
  output logic [NUM_MB-1:0] txd
);
  typedef enum logic [1:0] {S_IDLE, S_W0, S_W1} state_e;

  state_e            state;
  logic [NUM_MB-1:0] sel, tx_ready, tx_valid;
  word_t             w0_q, w1_q, cur;

  for (genvar i = 0; i < NUM_MB; i++) begin : g_tx
    uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
      .clk, .rst_n, .valid(tx_valid[i]), .word(cur), .ready(tx_ready[i]), .txd(txd[i])
    );
  end

  assign cur       = (state == S_W1) ? w1_q : w0_q;
  assign tx_valid  = (state == S_W0 || state == S_W1) && ((tx_ready & sel) == sel) ? sel : '0;
  assign cmd_ready = (state == S_IDLE) && (&tx_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; sel <= '0; w0_q <= '0; w1_q <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (cmd_valid && cmd_ready) begin
          sel   <= (cmd_target == 4'hF) ? enable : NUM_MB'(1) << cmd_target;
          w0_q  <= cmd_w0;
          w1_q  <= cmd_w1;
          state <= S_W0;
        end
        S_W0: if ((tx_ready & sel) == sel) state <= S_W1;
        S_W1: if ((tx_ready & sel) == sel) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
