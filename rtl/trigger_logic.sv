// trigger_logic: self-trigger and acquisition gate of one monitoring-board input slice.
//
// The analog chain has two discriminators on the shaped pulse: Th1 (low) makes the fast
// trigger, Th2 (> Th1) separates laser pulses from the smaller americium-source pulses. This
// block receives both comparator outputs, synchronises them, and on a rising edge of Th1
// (when armed and not vetoed) emits a one-cycle trig and opens the acquisition gate for
// GATE_CYCLES cycles. The peak-and-hold reset output ph_reset is asserted at all times except
// during the gate, so the held voltage follows the input until a trigger freezes the maximum.
// During the gate the Th2 output is watched; at the end of the gate class_valid pulses with the
// pulse type: calibration when the board is in calibration mode, otherwise laser (or
// simulation, in simulation mode) if Th2 fired, americium if only Th1 did. After the gate
// the comparator Th1 must fall before the slice re-arms.
//
// The two thresholds, the normally asserted reset and its release during the gate are as
// described for the hardware; the gate length (600 ns hold delay + 400 ns of peak samples =
// 40 cycles at 40 MHz), the re-arm rule and which side of Th2 is "laser" are this design's
// reading.
module trigger_logic
  import daq_pkg::*;
#(
  parameter int unsigned GATE_CYCLES = 40
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        th1,         // comparator Th1, asynchronous
  input  logic        th2,         // comparator Th2, asynchronous
  input  logic        veto,        // triggers ignored while high
  input  logic        calib_mode,
  input  logic        sim_mode,
  output logic        trig,        // one cycle
  output logic        gate,
  output logic        ph_reset,    // to the peak-and-hold, high = follow input
  output logic        class_valid, // one cycle at gate end
  output pulse_type_e ptype
);
  localparam int unsigned GW = $clog2(GATE_CYCLES + 1);

  logic [1:0] s1, s2;
  logic       th1_q, armed, th2_seen;
  logic [GW-1:0] gcnt;

  assign ph_reset = !gate;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= '0; s2 <= '0; th1_q <= 1'b0;
      armed <= 1'b1; gate <= 1'b0; gcnt <= '0; th2_seen <= 1'b0;
      trig <= 1'b0; class_valid <= 1'b0; ptype <= PT_LASER;
    end else begin
      s1 <= {s1[0], th1};
      s2 <= {s2[0], th2};
      th1_q <= s1[1];
      trig <= 1'b0;
      class_valid <= 1'b0;
      if (!gate) begin
        if (!s1[1]) armed <= 1'b1;
        if (armed && s1[1] && !th1_q && !veto) begin
          trig     <= 1'b1;
          gate     <= 1'b1;
          gcnt     <= GW'(GATE_CYCLES - 1);
          th2_seen <= s2[1];
          armed    <= 1'b0;
        end
      end else begin
        if (s2[1]) th2_seen <= 1'b1;
        if (gcnt == '0) begin
          gate        <= 1'b0;
          class_valid <= 1'b1;
          if (calib_mode)             ptype <= PT_CALIB;
          else if (th2_seen || s2[1]) ptype <= sim_mode ? PT_SIM : PT_LASER;
          else                        ptype <= PT_AMERICIUM;
        end else begin
          gcnt <= gcnt - 1'b1;
        end
      end
    end
  end
endmodule
