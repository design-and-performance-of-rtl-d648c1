// tb_trigger_logic: self-checking test of the self-trigger and acquisition gate.
// Pulses on Th1 with and without Th2, in normal, simulation and calibration mode, and under
// veto. Checks: one trig per pulse, trig seen at the 4th clock edge after Th1 rises (two
// synchroniser stages, the edge detector and the output register), gate and ph_reset low for
// exactly GATE_CYCLES, pulse type, no trigger while vetoed, no retrigger while Th1 stays high.
module tb_trigger_logic;
  import daq_pkg::*;
  localparam int GATE = 40;
  logic clk = 0, rst_n = 0;
  logic th1 = 0, th2 = 0, veto = 0, calib_mode = 0, sim_mode = 0;
  logic trig, gate, ph_reset, class_valid;
  pulse_type_e ptype;
  int checks = 0, failures = 0;
  int ntrig = 0, gate_len = 0, ncls = 0;
  pulse_type_e last_type;
  longint cyc = 0, t_edge = 0, t_trig = 0;

  trigger_logic #(.GATE_CYCLES(GATE)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (trig) begin ntrig++; t_trig = cyc; end
    if (gate) gate_len++;
    checks++;
    if (ph_reset == gate) failures++;
    if (class_valid) begin ncls++; last_type = ptype; end
  end

  task automatic pulse(input bit with_th2, input int width);
    int n0, g0;
    n0 = ntrig; g0 = gate_len;
    @(negedge clk);
    th1 = 1; th2 = with_th2; t_edge = cyc;
    repeat (width) @(negedge clk);
    th1 = 0; th2 = 0;
    repeat (GATE + 20) @(negedge clk);
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    // laser pulse
    pulse(1, 20);
    check(ntrig == 1, "one trigger for laser pulse");

    check(t_trig - t_edge == 4, "trigger seen on 4th clock edge after Th1");
    check(gate_len == GATE, "gate length");
    check(ncls == 1 && last_type == PT_LASER, "laser type");
    // americium: only Th1
    pulse(0, 20);
    check(ntrig == 2 && ncls == 2 && last_type == PT_AMERICIUM, "americium type");
    check(gate_len == 2 * GATE, "gate length 2");
    // simulation mode
    sim_mode = 1;
    pulse(1, 20);
    check(last_type == PT_SIM, "simulation type");
    sim_mode = 0;
    // calibration mode
    calib_mode = 1;
    pulse(1, 20);
    check(last_type == PT_CALIB, "calibration type");
    calib_mode = 0;
    // veto
    veto = 1;
    pulse(1, 20);
    check(ntrig == 4, "no trigger under veto");
    veto = 0;
    // Th1 stuck high through and after the gate: single trigger only
    pulse(1, 120);
    check(ntrig == 5, "no retrigger while Th1 high");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
