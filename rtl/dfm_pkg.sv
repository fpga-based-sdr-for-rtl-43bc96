// dfm_pkg: word types and widths shared by the blocks of the DPLL FM
// demodulator. The 8-bit sample and phase-error words, the 12-bit loop filter
// word and the 18-bit frequency-control word are the widths printed on the
// demodulator's block diagram; the rest are this design's choices.
package dfm_pkg;
  localparam int SAMPLE_W = 8;   // ADC sample, DFG output, phase detector output
  localparam int LF_W     = 12;  // loop filter output
  localparam int CTRL_W   = 18;  // gain output = DFG frequency control
  localparam int GAIN_W   = 6;   // programmable loop gain factor (own choice)

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic signed [LF_W-1:0]     lf_t;
  typedef logic signed [CTRL_W-1:0]   ctrl_t;
  typedef logic        [GAIN_W-1:0]   gain_t;
endpackage
