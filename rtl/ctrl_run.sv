// ctrl_run: run control of the readout controller: BOF distribution, counter synchronisation,
// busy/veto handling, dead-time measurement and error latching.
//
// * The begin-of-fill signal from the laser control board is synchronised; each rising edge,
//   while the run is enabled, is broadcast to the boards as a one-cycle bof and counted.
// * sync_req (from the op decoder) broadcasts a one-cycle sync that clears the BOF counters
//   of the controller and of every board.
// * Busy: any enabled board's busy line or the controller's own busy (USB FIFO full) blocks
//   data taking: veto is broadcast to the boards (their triggers are ignored) until it clears.
// * Dead time: three 32-bit counters of clock cycles with the OR of board busy lines, with the
//   controller busy, and with either (the total dead time).
// * Errors: the wired-OR error line of the backplane is watched; on its rising edge the
//   error condition is latched (flag, BOF count, busy lines of that moment) until err_clr.
// Function follows the text; the counter widths and what is latched are this design's choice.
module ctrl_run
  import daq_pkg::*;
#(
  parameter int unsigned NUM_MB = 12
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              bof_in,      // from the laser control board, asynchronous
  input  logic              run_en,
  input  logic              sync_req,
  input  logic [NUM_MB-1:0] enable,
  input  logic [NUM_MB-1:0] mb_busy,
  input  logic              ctrl_busy,
  input  logic              error_in,    // wired-OR of the boards' error lines
  input  logic              err_clr,
  output logic              bof,
  output logic              sync,
  output logic              veto,
  output word_t             bof_count,
  output logic [31:0]       dt_mb,
  output logic [31:0]       dt_ctrl,
  output logic [31:0]       dt_total,
  output logic              err_latched,
  output word_t             err_bof,
  output logic [NUM_MB-1:0] err_busy
);
  logic [2:0] bof_s;
  logic [1:0] err_s;
  logic       any_mb_busy;

  assign any_mb_busy = |(mb_busy & enable);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bof_s <= '0; err_s <= '0; bof <= 1'b0; sync <= 1'b0; veto <= 1'b0; bof_count <= '0;
      dt_mb <= '0; dt_ctrl <= '0; dt_total <= '0;
      err_latched <= 1'b0; err_bof <= '0; err_busy <= '0;
    end else begin
      bof_s <= {bof_s[1:0], bof_in};
      err_s <= {err_s[0], error_in};
      bof   <= 1'b0;
      sync  <= sync_req;
      veto  <= any_mb_busy || ctrl_busy;
      if (sync_req) begin
        bof_count <= '0;
      end else if (run_en && bof_s[1] && !bof_s[2]) begin
        bof       <= 1'b1;
        bof_count <= bof_count + 1'b1;
      end
      if (any_mb_busy)              dt_mb    <= dt_mb + 1'b1;
      if (ctrl_busy)                dt_ctrl  <= dt_ctrl + 1'b1;
      if (any_mb_busy || ctrl_busy) dt_total <= dt_total + 1'b1;
      if (err_clr) err_latched <= 1'b0;
      else if (err_s[0] && !err_s[1] && !err_latched) begin
        err_latched <= 1'b1;
        err_bof     <= bof_count;
        err_busy    <= mb_busy;
      end
    end
  end
endmodule
