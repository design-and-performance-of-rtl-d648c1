// tb_calib_ramp: self-checking test of the calibration ramp generator.
// Programs 4 waveforms, step 10, maximum 35, gap 6 and follows the DAC code every cycle
// against an independent model: each waveform rises by exactly one LSB per clock from 0 to
// min(i*step, max), drops to 0, rests for the gap; calib_mode covers the sequence and done
// pulses once at the end. A second run checks stop and the 8191 positive-range limit.
module tb_calib_ramp;
  import daq_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, stop = 0;
  logic [15:0] n_wave = 4, gap = 6;
  logic [13:0] max_code = 35, step = 10, dac;
  logic calib_mode, done;
  int checks = 0, failures = 0;
  int peaks [$];
  int prev, ndone, rise_ok;

  calib_ramp dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int zeros;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    prev = 0; ndone = 0; rise_ok = 1; zeros = 0;
    while (ndone == 0) begin
      @(posedge clk); #1;
      if (int'(dac) > prev && int'(dac) != prev + 1) rise_ok = 0;
      if (int'(dac) < prev) begin
        peaks.push_back(prev);
        check(dac == 0, "ramp returns to zero");
      end
      if (done) ndone++;
      if (!done && ndone == 0) check(calib_mode, "calib_mode during sequence");
      prev = dac;
    end
    check(rise_ok == 1, "slope one LSB per clock");
    check(peaks.size() == 4, "four waveforms");
    if (peaks.size() == 4) begin
      check(peaks[0] == 10 && peaks[1] == 20 && peaks[2] == 30 && peaks[3] == 35, "peaks 10 20 30 35");
    end
    @(posedge clk); #1;
    check(!calib_mode && dac == 0, "idle after done");
    // long sequence with limit and stop
    max_code = 14'd12000; step = 14'd3000; n_wave = 10;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    peaks.delete(); prev = 0;
    repeat (40000) begin
      @(posedge clk); #1;
      check(dac <= 8191, "positive range");
      if (int'(dac) < prev) peaks.push_back(prev);
      prev = dac;
    end
    check(peaks.size() >= 3 && peaks[2] == 8191, "third peak limited to 8191");
    @(negedge clk) stop = 1;
    @(negedge clk) stop = 0;
    #1 check(!calib_mode && dac == 0, "stop");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
