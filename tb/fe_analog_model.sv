// fe_analog_model: behavioural model of one analog front-end channel for the testbenches:
// shaped pulse, the two discriminators, the peak-and-hold and the ADC.
// A one-cycle fire with amplitude amp produces a flat-topped shaped pulse of WIDTH cycles
// (600 ns at 40 MHz). th1/th2 are high while the pulse exceeds TH1/TH2. The held voltage
// follows the pulse while ph_reset is high and keeps its maximum while ph_reset is low. The
// ADC output is BASE + held, registered once. So a triggered pulse of amplitude amp is
// measured as baseline BASE and peak BASE + amp.
module fe_analog_model #(
  parameter int BASE  = 500,
  parameter int TH1   = 100,
  parameter int TH2   = 2000,
  parameter int WIDTH = 24
) (
  input  logic        clk,
  input  logic        fire,
  input  logic [13:0] amp,
  input  logic        ph_reset,
  output logic        th1,
  output logic        th2,
  output logic [13:0] adc_data
);
  int sig = 0, held = 0, left = 0;

  assign th1 = sig > TH1;
  assign th2 = sig > TH2;

  always @(posedge clk) begin
    if (fire) begin
      sig  = int'(amp);
      left = WIDTH;
    end else if (left > 0) begin
      left--;
      if (left == 0) sig = 0;
    end
    if (ph_reset) held = sig;
    else if (sig > held) held = sig;
    adc_data <= 14'(BASE + held);
  end
endmodule
