// tb_adc_readout: self-checking test of the circular buffer and the averages.
// The ADC input is a known sequence (a baseline with a deterministic ripple, then a held
// peak). The testbench records every sample with its cycle number and computes the expected
// baseline (16 samples ending BASE_GAP samples before the trigger) and peak (16 samples from
// 24 cycles = 600 ns after the trigger) itself. Also checks the latency: the result must come
// once the last peak sample (trigger + 39) has been written, i.e. 41 cycles after trig.
module tb_adc_readout;
  import daq_pkg::*;
  logic clk = 0, rst_n = 0, trig = 0;
  logic [ADC_W-1:0] adc_data = 0, baseline, peak;
  logic busy, done;
  int checks = 0, failures = 0;
  logic [ADC_W-1:0] hist [longint];
  longint cyc = 0, t_trig;

  adc_readout dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    hist[cyc] = adc_data;
    cyc++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(input int base, input int amp);
    longint t;
    int sb, sp, lat;
    // baseline with ripple
    repeat (40) begin
      @(negedge clk);
      adc_data = ADC_W'(base + $urandom_range(7));
    end
    @(negedge clk);
    trig = 1;
    t = cyc;               // sample of this cycle is hist[t]
    adc_data = ADC_W'(base + amp / 2);
    @(negedge clk);
    trig = 0;
    lat = 1;
    while (!done) begin
      adc_data = ADC_W'(base + amp + $urandom_range(3));
      @(negedge clk);
      lat++;
    end
    sb = 0; sp = 0;
    for (int i = 0; i < 16; i++) begin
      sb += hist[t - 4 - 16 + i];
      sp += hist[t + 24 + i];
    end
    check(baseline == ADC_W'(sb / 16), "baseline average");
    check(peak == ADC_W'(sp / 16), "peak average");
    check(lat == 41, "result latency 41 cycles (600 ns + 400 ns + 2)");
    repeat (5) @(negedge clk);
    check(!busy, "idle after result");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    measure(1000, 3000);
    measure(200, 12000);
    measure(5000, 40);
    for (int k = 0; k < 5; k++) measure($urandom_range(2000), $urandom_range(10000));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
