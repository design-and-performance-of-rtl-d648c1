// adc_readout: "ADC readout" block of one input slice: circular sample buffer and the
// baseline and peak averages.
//
// The 14-bit ADC samples the peak-and-hold output continuously at the 40 MHz clock; every
// sample is written into a circular buffer of BUF_DEPTH entries. On a trigger the write
// position T is remembered. The N_AVG samples written just before T are read back and
// averaged: the baseline. The samples T+PEAK_DELAY ... T+PEAK_DELAY+N_AVG-1 are read as soon
// as they have been written (PEAK_DELAY = 24 cycles = 600 ns, the hold settling delay; 16
// samples span 400 ns) and averaged: the peak. Averages are the sum shifted right by
// log2(N_AVG), i.e. truncated.
//
// Interface: trig starts a measurement (ignored while busy). done pulses for one cycle with
// baseline and peak, PEAK_DELAY + N_AVG + 2 cycles after trig. busy is high in between.
// The 16-sample averages, 600 ns delay and 400 ns window follow the text; the buffer depth,
// the BASE_GAP skip and the truncating average are this design's choice.
module adc_readout
  import daq_pkg::*;
#(
  parameter int unsigned N_AVG      = 16,
  parameter int unsigned PEAK_DELAY = 24,
  parameter int unsigned BASE_GAP   = 4,
  parameter int unsigned BUF_DEPTH  = 64
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [ADC_W-1:0] adc_data,
  input  logic             trig,
  output logic             busy,
  output logic             done,
  output logic [ADC_W-1:0] baseline,
  output logic [ADC_W-1:0] peak
);
  localparam int unsigned AW = $clog2(BUF_DEPTH);
  localparam int unsigned NW = $clog2(N_AVG);
  localparam int unsigned SW = ADC_W + NW;

  typedef enum logic [1:0] {S_IDLE, S_BASE, S_PEAK} state_e;

  logic [ADC_W-1:0] ring [BUF_DEPTH];
  logic [AW-1:0] wp, t0, rp;
  logic [NW:0]   k;
  logic [SW-1:0] sum;
  state_e        state;
  logic [AW-1:0] ahead;

  // number of samples written since T, including the one being written now
  assign ahead = wp - t0;

  always_ff @(posedge clk) ring[wp] <= adc_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; t0 <= '0; rp <= '0; k <= '0; sum <= '0;
      state <= S_IDLE; done <= 1'b0; baseline <= '0; peak <= '0;
    end else begin
      wp   <= wp + 1'b1;
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (trig) begin
          t0    <= wp;
          rp    <= wp - AW'(N_AVG + BASE_GAP);
          k     <= '0;
          sum   <= '0;
          state <= S_BASE;
        end
        S_BASE: begin
          sum <= sum + SW'(ring[rp]);
          rp  <= rp + 1'b1;
          if (k == (NW+1)'(N_AVG - 1)) begin
            baseline <= ADC_W'((sum + SW'(ring[rp])) >> NW);
            sum   <= '0;
            k     <= '0;
            rp    <= t0 + AW'(PEAK_DELAY);
            state <= S_PEAK;
          end else k <= k + 1'b1;
        end
        S_PEAK: begin
          // sample rp is in the ring once the write pointer has passed it
          if (ahead > AW'(PEAK_DELAY) + AW'(k)) begin
            sum <= sum + SW'(ring[rp]);
            rp  <= rp + 1'b1;
            if (k == (NW+1)'(N_AVG - 1)) begin
              peak  <= ADC_W'((sum + SW'(ring[rp])) >> NW);
              done  <= 1'b1;
              state <= S_IDLE;
            end else k <= k + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  initial assert (BUF_DEPTH >= PEAK_DELAY + 2 * N_AVG + BASE_GAP + 4)
    else $error("adc_readout: BUF_DEPTH too small");
endmodule
