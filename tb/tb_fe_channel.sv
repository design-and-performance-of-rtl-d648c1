// tb_fe_channel: self-checking test of one front-end slice with a behavioural analog chain.
// Laser-size and americium-size pulses are fired into fe_analog_model (baseline 500); each
// must produce exactly one 16-word frame in the FIFO whose BOF number, type, baseline (500) and
// peak (500 + amplitude) are right. The FIFO is made 64 words deep so that the fifth pulse
// finds no room: busy must rise at four frames and the fifth frame must be dropped and counted.
// Then the FIFO is drained and idle must be high. A change of HV code must appear on the DAC
// serial lines.
module tb_fe_channel;
  import daq_pkg::*;
  logic clk = 0, rst_n = 0;
  logic th1, th2, ph_reset;
  logic [ADC_W-1:0] adc_data;
  logic [11:0] hv_code = 12'h0AB;
  logic hv_sclk, hv_mosi, hv_cs_n;
  word_t slow_in [NUM_SLOW-1];
  logic bof = 0, sync = 0, veto = 0, calib_mode = 0, sim_mode = 0, rd_en = 0;
  word_t bof_num = 16'd3, rd_data;
  logic empty, busy, idle;
  logic [7:0] dropped;
  logic fire = 0;
  logic [13:0] amp = 0;
  int checks = 0, failures = 0;
  logic [15:0] spi_sh;
  int spi_n = 0;
  logic [15:0] spi_word;

  fe_channel #(.FIFO_DEPTH(64)) dut (.clk, .rst_n, .channel(2'd1), .th1, .th2, .ph_reset,
    .adc_data, .hv_code, .hv_sclk, .hv_mosi, .hv_cs_n, .slow_in, .bof, .sync, .veto, .bof_num,
    .calib_mode, .sim_mode, .rd_en, .rd_data, .empty, .busy, .idle, .dropped);

  fe_analog_model #(.BASE(500), .TH1(100), .TH2(2000)) afe (.clk, .fire, .amp, .ph_reset,
    .th1, .th2, .adc_data);

  always #5 clk = ~clk;
  always @(posedge hv_sclk) if (!hv_cs_n) begin spi_sh = {spi_sh[14:0], hv_mosi}; spi_n++; end
  always @(posedge hv_cs_n) begin if (spi_n == 16) spi_word = spi_sh; spi_n = 0; end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic shoot(input int a);
    @(negedge clk) begin fire = 1; amp = 14'(a); end
    @(negedge clk) fire = 0;
    repeat (120) @(negedge clk);
  endtask

  task automatic read_frame(input pulse_type_e t, input int a);
    word_t f [16];
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      check(!empty, "frame word present");
      f[i] = rd_data;
      rd_en = 1;
      @(negedge clk) rd_en = 0;
    end
    check(f[0] == bof_num, "BOF number");
    check(f[9] == (FE_MARK | 16'd1), "marker");
    check(f[11][15:14] == t, "pulse type");
    check(f[14] == 16'd500, "baseline");
    check(f[15] == 16'(500 + a), "peak");
  endtask

  initial begin
    for (int i = 0; i < NUM_SLOW - 1; i++) slow_in[i] = 16'(i);
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (100) @(negedge clk);
    check(spi_word == 16'h00AB, "HV code written after reset");
    hv_code = 12'h3C5;
    shoot(5000);
    check(spi_word == 16'h03C5, "HV code change written");
    shoot(800);
    shoot(6000);
    check(!busy, "not busy at three frames");
    shoot(3000);
    check(busy, "busy at four frames (64-word FIFO)");
    shoot(4000);
    check(dropped == 1, "fifth frame dropped");
    read_frame(PT_LASER, 5000);
    check(!busy, "busy cleared after reading");
    read_frame(PT_AMERICIUM, 800);
    read_frame(PT_LASER, 6000);
    read_frame(PT_LASER, 3000);
    @(negedge clk);
    check(empty && idle, "empty and idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
