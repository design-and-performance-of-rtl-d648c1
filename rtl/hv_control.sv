// hv_control: high-voltage programming of one input slice.
//
// The bias of each photodetector is set by a dedicated 12-bit DAC. Whenever the requested
// code differs from the code last written (and after reset), this block writes it over a
// three-wire serial interface: cs_n low, 16 bits MSB first on mosi ({4'b0000, code}), data
// changing on the falling edge of sclk and stable on its rising edge, sclk = clk / (2*SCLK_HALF).
// written_code is the value the DAC holds. The 12-bit DAC is from the text; the serial
// format is this design's choice, since the DAC part is not named.
module hv_control
  import daq_pkg::*;
#(
  parameter int unsigned SCLK_HALF = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [HV_DAC_W-1:0] code,
  output logic                sclk,
  output logic                mosi,
  output logic                cs_n,
  output logic [HV_DAC_W-1:0] written_code,
  output logic                busy
);
  localparam int unsigned DW = $clog2(SCLK_HALF + 1);

  logic [15:0]     sh;
  logic [4:0]      nbit;
  logic [DW-1:0]   div;
  logic            dirty;
  logic [HV_DAC_W-1:0] pending;

  assign mosi = sh[15];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh <= '0; nbit <= '0; div <= '0; busy <= 1'b0; dirty <= 1'b1;
      sclk <= 1'b0; cs_n <= 1'b1; written_code <= '0; pending <= '0;
    end else if (!busy) begin
      sclk <= 1'b0;
      cs_n <= 1'b1;
      if (dirty || code != written_code) begin
        pending <= code;
        sh      <= {4'b0000, code};
        nbit    <= 5'd16;
        div     <= '0;
        busy    <= 1'b1;
        cs_n    <= 1'b0;
        dirty   <= 1'b0;
      end
    end else begin
      if (div == DW'(SCLK_HALF - 1)) begin
        div  <= '0;
        sclk <= !sclk;
        if (sclk) begin           // falling edge: next bit
          sh   <= {sh[14:0], 1'b0};
          nbit <= nbit - 1'b1;
          if (nbit == 5'd1) begin
            busy         <= 1'b0;
            cs_n         <= 1'b1;
            written_code <= pending;
          end
        end
      end else div <= div + 1'b1;
    end
  end
endmodule
