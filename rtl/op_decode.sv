// op_decode: the controller's "OP-Decode" logic, the single entry point of the embedded CPU.
//
// The CPU delivers 32-bit instructions {op, target, addr, data} (instr_t in daq_pkg) with a
// valid/ready handshake and receives one response word per instruction (resp_valid, with
// resp_err for a timed-out board read). Resources, internal and external, share this format:
//   OP_WR_INT / OP_RD_INT  controller registers: CREG_ENABLE (slot mask), CREG_RUN,
//                          read only CREG_BOF, CREG_ERR, dead-time counters (high word at the
//                          even address, low word at the odd one), CREG_RXERR (data[11:8] =
//                          slot), CREG_EVTS, CREG_MON (RX monitor word data[4:0] of slot
//                          data[11:8])
//   OP_WR_MB / OP_RD_MB    board register addr of slot target (4'hF = all enabled, write
//                          only), sent by ctrl_tx; a read waits up to TIMEOUT cycles for the
//                          slot's reply
//   OP_SYNC                broadcast the BOF-counter synchronisation
//   OP_ERR_CLR             clear the latched error condition
// A response is returned for every instruction (writes answer with their data).
// The single instruction format reaching internal and external resources follows the text;
// the encoding is this design's choice.
module op_decode
  import daq_pkg::*;
#(
  parameter int unsigned NUM_MB  = 12,
  parameter int unsigned TIMEOUT = 4096
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              instr_valid,
  input  instr_t            instr,
  output logic              instr_ready,
  output logic              resp_valid,
  output word_t             resp_data,
  output logic              resp_err,
  // controller registers and status
  output logic [NUM_MB-1:0] enable,
  output logic              run_en,
  output logic              sync_req,
  output logic              err_clr,
  input  word_t             bof_count,
  input  logic              err_latched,
  input  word_t             err_bof,
  input  logic [31:0]       dt_mb,
  input  logic [31:0]       dt_ctrl,
  input  logic [31:0]       dt_total,
  input  word_t             rx_err [NUM_MB],
  input  word_t             evt_count,
  output logic [4:0]        mon_sel,
  input  word_t             mon_data [NUM_MB],
  // board access
  output logic              cmd_valid,
  output logic [3:0]        cmd_target,
  output word_t             cmd_w0,
  output word_t             cmd_w1,
  input  logic              cmd_ready,
  input  logic [NUM_MB-1:0] reply_valid,
  input  word_t             reply_data [NUM_MB],
  output logic [NUM_MB-1:0] reply_ack
);
  localparam int unsigned TW = $clog2(TIMEOUT + 1);

  typedef enum logic [1:0] {S_IDLE, S_CMD, S_WAIT} state_e;

  state_e  state;
  instr_t  q;
  word_t   rd_int;
  logic [TW-1:0] tmo;
  logic [3:0] slot_sel;

  assign instr_ready = (state == S_IDLE);

  assign slot_sel = instr.data[11:8];
  assign mon_sel  = instr.data[4:0];

  always_comb begin
    rd_int = '0;
    unique case (instr.addr)
      CREG_ENABLE:      rd_int = word_t'(enable);
      CREG_RUN:         rd_int = word_t'(run_en);
      CREG_BOF:         rd_int = bof_count;
      CREG_ERR:         rd_int = {err_latched, 3'b0, err_bof[11:0]};
      CREG_DT_MB:       rd_int = dt_mb[31:16];
      CREG_DT_MB + 1:   rd_int = dt_mb[15:0];
      CREG_DT_CTRL:     rd_int = dt_ctrl[31:16];
      CREG_DT_CTRL + 1: rd_int = dt_ctrl[15:0];
      CREG_DT_TOT:      rd_int = dt_total[31:16];
      CREG_DT_TOT + 1:  rd_int = dt_total[15:0];
      CREG_RXERR:       rd_int = (slot_sel < 4'(NUM_MB)) ? rx_err[slot_sel] : '0;
      CREG_EVTS:        rd_int = evt_count;
      CREG_MON:         rd_int = (slot_sel < 4'(NUM_MB)) ? mon_data[slot_sel] : '0;
      default:          rd_int = 16'hDEAD;
    endcase
  end

  assign cmd_valid  = (state == S_CMD);
  assign cmd_target = q.target;
  assign cmd_w0     = {(q.op == OP_RD_MB) ? CMD_READ : CMD_WRITE, 4'b0, q.addr};
  assign cmd_w1     = q.data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; q <= '0; tmo <= '0;
      enable <= '0; run_en <= 1'b0; sync_req <= 1'b0; err_clr <= 1'b0;
      resp_valid <= 1'b0; resp_data <= '0; resp_err <= 1'b0; reply_ack <= '0;
    end else begin
      sync_req   <= 1'b0;
      err_clr    <= 1'b0;
      resp_valid <= 1'b0;
      reply_ack  <= '0;
      unique case (state)
        S_IDLE: if (instr_valid) begin
          q <= instr;
          unique case (instr.op)
            OP_WR_INT: begin
              if (instr.addr == CREG_ENABLE) enable <= NUM_MB'(instr.data);
              if (instr.addr == CREG_RUN)    run_en <= instr.data[0];
              resp_valid <= 1'b1; resp_data <= instr.data; resp_err <= 1'b0;
            end
            OP_RD_INT: begin
              resp_valid <= 1'b1; resp_data <= rd_int; resp_err <= 1'b0;
            end
            OP_WR_MB, OP_RD_MB: begin
              if (instr.op == OP_RD_MB && instr.target >= 4'(NUM_MB)) begin
                resp_valid <= 1'b1; resp_data <= '0; resp_err <= 1'b1;
              end else state <= S_CMD;
            end
            OP_SYNC: begin
              sync_req <= 1'b1;
              resp_valid <= 1'b1; resp_data <= '0; resp_err <= 1'b0;
            end
            OP_ERR_CLR: begin
              err_clr <= 1'b1;
              resp_valid <= 1'b1; resp_data <= '0; resp_err <= 1'b0;
            end
            default: begin
              resp_valid <= 1'b1; resp_data <= '0; resp_err <= 1'b0;
            end
          endcase
        end
        S_CMD: if (cmd_ready) begin
          if (q.op == OP_RD_MB) begin
            tmo   <= TW'(TIMEOUT);
            state <= S_WAIT;
          end else begin
            resp_valid <= 1'b1; resp_data <= q.data; resp_err <= 1'b0;
            state <= S_IDLE;
          end
        end
        S_WAIT: begin
          if (reply_valid[q.target]) begin
            reply_ack[q.target] <= 1'b1;
            resp_valid <= 1'b1; resp_data <= reply_data[q.target]; resp_err <= 1'b0;
            state <= S_IDLE;
          end else if (tmo == '0) begin
            resp_valid <= 1'b1; resp_data <= '0; resp_err <= 1'b1;
            state <= S_IDLE;
          end else tmo <= tmo - 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
