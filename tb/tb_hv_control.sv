// tb_hv_control: self-checking test of the HV DAC serial writer.
// A behavioural DAC shifts mosi in on each rising sclk edge while cs_n is low and latches
// the 16-bit word when cs_n rises. After reset the initial code must be written; every
// change of code must produce exactly one write of {4'b0, code}; an unchanged code must not.
module tb_hv_control;
  import daq_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [11:0] code = 12'h123, written_code;
  logic sclk, mosi, cs_n, busy;
  int checks = 0, failures = 0;
  logic [15:0] sh, dac_word;
  int nbits = 0, nwrites = 0;

  hv_control dut (.*);

  always #5 clk = ~clk;

  always @(posedge sclk) if (!cs_n) begin sh = {sh[14:0], mosi}; nbits++; end
  always @(posedge cs_n) begin
    if (nbits == 16) begin dac_word = sh; nwrites++; end
    nbits = 0;
  end

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

  task automatic wait_idle();
    repeat (3) @(posedge clk);
    while (busy) @(posedge clk);
    repeat (3) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait_idle();
    check(nwrites == 1 && dac_word == 16'h0123, "initial write after reset");
    check(written_code == 12'h123, "written code");
    for (int i = 0; i < 10; i++) begin
      logic [11:0] c;
      c = 12'($urandom);
      if (c == code) c = c + 1;
      code = c;
      wait_idle();
      check(nwrites == 2 + i, "one write per change");
      check(dac_word == {4'b0, c}, "DAC word");
      check(written_code == c, "written code follows");
    end
    repeat (200) @(posedge clk);
    check(nwrites == 11, "no write without change");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
