// loop_gain: the GAIN block between the loop filter and the digital
// frequency generator. It multiplies the signed 12-bit loop filter output by
// an unsigned 6-bit run-time gain factor and delivers the signed 18-bit
// frequency-control word that is added to the DFG's phase increment. The
// 12-bit input and 18-bit output widths are the document's; the multiplier,
// the 6-bit factor (12 + 6 = 18 bits, so the product never overflows) and
// the register are this design's choices.
// Timing: ctrl is registered, one clock after d. Synchronous active-high
// reset clears ctrl.
module loop_gain
  import dfm_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  lf_t   d,      // loop filter output
  input  gain_t gain,   // loop gain factor, 0..63
  output ctrl_t ctrl    // frequency control word for the DFG
);
  ctrl_t prod;

  always_comb prod = CTRL_W'(d) * $signed({1'b0, gain});

  always_ff @(posedge clk) begin
    if (rst) ctrl <= '0;
    else     ctrl <= prod;
  end
endmodule
