// dfg: digital frequency generator (numerically controlled oscillator) of
// the DPLL FM demodulator. As in the document it is built from a shift
// register, an adder, a latch and a waveform table: the shift register takes
// the free-running frequency word serially from a microcontroller, the adder
// adds that word (plus the loop's signed control word) to the latch every
// clock, and the latch value addresses the quarter-wave sine table. With
// ctrl = 0 the generator runs at the free-running frequency
//     f = fcw * f_clk / 2**ACC_W.
// Own choices: a 24-bit phase latch whose 14 MSBs address the table; the
// serial word is shifted in MSB first on ser_shift and is moved to the adder
// on ser_load (so a new word takes effect all at once, synchronised with the
// adder); both cosine (fed to the phase detector) and sine are produced.
// Timing: phase is the latch; cos_out/sin_out are one clock behind it, so a
// change of ctrl reaches the outputs two clocks later. Synchronous
// active-high reset clears the latch and loads FCW_RESET as the word.
module dfg
  import dfm_pkg::*;
#(
  parameter int              ACC_W     = 24,  // phase latch width
  parameter int              ADDR_W    = 14,  // table address bits
  parameter logic [ACC_W-1:0] FCW_RESET = '0  // frequency word after reset
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             ser_data,   // serial frequency word, MSB first
  input  logic             ser_shift,  // shift ser_data in this clock
  input  logic             ser_load,   // move the shift register to the adder
  input  ctrl_t            ctrl,       // signed frequency control from the gain
  output logic [ACC_W-1:0] phase,      // phase latch
  output logic [ACC_W-1:0] fcw,        // active free-running frequency word
  output sample_t          cos_out,    // local cosine to the phase detector
  output sample_t          sin_out     // local sine
);
  logic [ACC_W-1:0]  sreg;
  logic [ADDR_W-1:0] sin_addr, cos_addr;

  always_ff @(posedge clk) begin
    if (rst) begin
      sreg  <= '0;
      fcw   <= FCW_RESET;
      phase <= '0;
    end else begin
      if (ser_shift) sreg <= {sreg[ACC_W-2:0], ser_data};
      if (ser_load)  fcw  <= sreg;
      phase <= phase + fcw + ACC_W'(ctrl);
    end
  end

  // cosine leads sine by a quarter turn
  always_comb begin
    sin_addr = phase[ACC_W-1 -: ADDR_W];
    cos_addr = sin_addr + ADDR_W'(2 ** (ADDR_W - 2));
  end

  sine_rom #(.ADDR_W(ADDR_W), .AMP_W(SAMPLE_W)) u_sin_rom (
    .clk(clk), .addr(sin_addr), .amp(sin_out));
  sine_rom #(.ADDR_W(ADDR_W), .AMP_W(SAMPLE_W)) u_cos_rom (
    .clk(clk), .addr(cos_addr), .amp(cos_out));
endmodule
