// phase_detector: multiplier phase detector of the DPLL FM demodulator.
// The digitised FM input M(n) = sin(wn + theta) is multiplied by the DFG's
// local cosine U(n) = cos(wn + phi); the product holds a term proportional to
// sin(theta - phi) (the phase error) plus a double-frequency term that the
// loop filter removes. Using a multiplier follows the document; the scaling
// is this design's: the 16-bit signed product is divided by 128 (arithmetic
// shift, Km = 1/128) and saturated to the 8-bit output width.
// Interface: m_in and u_in are 8-bit two's complement samples, one per clock.
// Timing: e_out is registered, one clock after the inputs. Synchronous,
// active-high reset clears e_out.
module phase_detector
  import dfm_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  sample_t m_in,   // digital FM sample from the ADC
  input  sample_t u_in,   // cosine from the digital frequency generator
  output sample_t e_out   // phase error
);
  localparam int PROD_W = 2 * SAMPLE_W;
  localparam int SHIFT  = SAMPLE_W - 1;

  logic signed [PROD_W-1:0] prod;
  logic signed [PROD_W-1:0] scaled;
  sample_t                  sat;

  always_comb begin
    prod   = m_in * u_in;
    scaled = prod >>> SHIFT;
    if (scaled > PROD_W'(2 ** (SAMPLE_W - 1) - 1))
      sat = sample_t'(2 ** (SAMPLE_W - 1) - 1);
    else if (scaled < -PROD_W'(2 ** (SAMPLE_W - 1)))
      sat = sample_t'(-(2 ** (SAMPLE_W - 1)));
    else
      sat = sample_t'(scaled);
  end

  always_ff @(posedge clk) begin
    if (rst) e_out <= '0;
    else     e_out <= sat;
  end
endmodule
