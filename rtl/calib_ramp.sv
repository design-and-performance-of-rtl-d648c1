// calib_ramp: "Calib logic" of the monitoring board: the linear ramp generator that drives
// the 14-bit calibration DAC, whose output reaches the test capacitor at each preamplifier
// input and so injects a known charge.
//
// A calibration sequence is programmed by three numbers: the number of waveforms, the
// maximum code and the step. Waveform i (i = 1 .. n_wave) rises from 0 by one DAC LSB per
// clock (25 ns at 40 MHz) until it reaches min(i*step, max), is then set back to 0 and held
// there for gap cycles before the next waveform starts, so every waveform injects a charge
// one step larger than the one before. After the last waveform the DAC rests at 0 and done
// pulses. In bipolar use, codes 0..8191 are positive pulses; codes are limited to 8191 here.
// calib_mode is high for the whole sequence, so the front ends mark their pulses as
// calibration pulses.
//
// The one-LSB-per-clock slope and the (waveforms, maximum, step) programming follow the
// text; the ramp-back-to-zero, the gap between waveforms and the i*step amplitude rule are
// this design's own choices.
module calib_ramp
  import daq_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic                 stop,
  input  logic [15:0]          n_wave,
  input  logic [CAL_DAC_W-1:0] max_code,
  input  logic [CAL_DAC_W-1:0] step,
  input  logic [15:0]          gap,
  output logic [CAL_DAC_W-1:0] dac,
  output logic                 calib_mode,
  output logic                 done
);
  localparam logic [CAL_DAC_W-1:0] POS_MAX = CAL_DAC_W'(8191);

  typedef enum logic [1:0] {S_IDLE, S_RAMP, S_GAP} state_e;

  state_e state;
  logic [15:0] wave;
  logic [CAL_DAC_W-1:0] target, lim;
  logic [CAL_DAC_W:0] next_target;
  logic [15:0] gcnt;

  assign lim         = (max_code > POS_MAX) ? POS_MAX : max_code;
  assign next_target = {1'b0, target} + {1'b0, step};
  assign calib_mode  = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; wave <= '0; target <= '0; gcnt <= '0; dac <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (stop) begin
        state <= S_IDLE;
        dac   <= '0;
      end else begin
        unique case (state)
          S_IDLE: if (start && n_wave != 0 && step != 0) begin
            wave   <= 16'd1;
            target <= (step > lim) ? lim : step;
            dac    <= '0;
            state  <= S_RAMP;
          end
          S_RAMP: begin
            if (dac >= target) begin
              dac   <= '0;
              gcnt  <= gap;
              state <= S_GAP;
            end else dac <= dac + 1'b1;
          end
          S_GAP: begin
            if (gcnt != 0) gcnt <= gcnt - 1'b1;
            else if (wave == n_wave) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              wave   <= wave + 1'b1;
              target <= (next_target > {1'b0, lim}) ? lim : next_target[CAL_DAC_W-1:0];
              state  <= S_RAMP;
            end
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end
endmodule
