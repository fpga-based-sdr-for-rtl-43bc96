// loop_filter: low-pass loop filter of the DPLL FM demodulator.
// It keeps a 12-bit state d1 that each clock gains twice the 8-bit phase
// error c and loses one sixteenth of the value it held one clock earlier:
//     d1[n+1] = d1[n] + 2*c[n] - (d1[n-1] >>> 4)
// a leaky integrator with DC gain 32 that suppresses the detector's
// double-frequency term. d2 is d1 with its four low bits cleared, the 8-bit
// coarse copy used for the message path (its four LSBs are constant zero by
// definition). The port names (c, clk, reset, d1,
// d2) and widths are the document's; the recurrence and the d2 rule are
// this design's reading of the filter's published simulation trace, which
// they reproduce value for value. Saturation of d1 at the 12-bit limits is
// this design's own addition.
// Timing: d1 and d2 are registered; reset is synchronous and active high and
// clears the state, so the first non-zero output follows the first clock
// after reset is released.
module loop_filter
  import dfm_pkg::*;
#(
  parameter int IN_SHIFT   = 1,   // input gain 2**IN_SHIFT
  parameter int LEAK_SHIFT = 4    // leak of 1/2**LEAK_SHIFT per clock
) (
  input  logic    clk,
  input  logic    reset,
  input  sample_t c,     // phase error from the phase detector
  output lf_t     d1,    // full-precision filter output (to the gain)
  output lf_t     d2     // output with 4 LSBs cleared (to the FIR filter)
);
  localparam int SUM_W = LF_W + 2;
  localparam logic signed [SUM_W-1:0] MAXV = SUM_W'(2 ** (LF_W - 1) - 1);
  localparam logic signed [SUM_W-1:0] MINV = -SUM_W'(2 ** (LF_W - 1));

  lf_t                     d1_q, d1_prev;
  logic signed [SUM_W-1:0] sum;
  lf_t                     next;

  always_comb begin
    sum = SUM_W'(d1_q) + (SUM_W'(c) <<< IN_SHIFT) - SUM_W'(d1_prev >>> LEAK_SHIFT);
    if (sum > MAXV)      next = lf_t'(MAXV);
    else if (sum < MINV) next = lf_t'(MINV);
    else                 next = lf_t'(sum);
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      d1_q    <= '0;
      d1_prev <= '0;
    end else begin
      d1_q    <= next;
      d1_prev <= d1_q;
    end
  end

  assign d1 = d1_q;
  assign d2 = {d1_q[LF_W-1:4], 4'b0000};
endmodule
