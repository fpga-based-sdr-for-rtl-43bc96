// dfm_demodulator: digital PLL demodulator for a digitised FM wave, the
// receive path of a software defined radio. The loop is
//     ADC samples -> phase detector -> loop filter -> gain -> DFG -> (back)
// The phase detector multiplies the input by the DFG's cosine; the loop
// filter keeps the slowly varying phase-error term; the gain turns it into a
// frequency-control word that pulls the DFG onto the input's instantaneous
// frequency. Because the control word must follow the input's frequency
// deviation, the loop filter output is the recovered message; its coarse
// 8-significant-bit copy is smoothed by the FIR filter and sent to the DAC.
// Block order and the 8/12/18/8-bit widths between them follow the
// document's block diagram; which loop filter output feeds which branch
// (d1 to the gain, d2 to the FIR filter) is this design's choice. The ADC
// and DAC are outside: adc_in and dac_out are their digital sides.
// Timing: one sample per clock. Loop latency from adc_in to the DFG phase
// is four clocks (detector, loop filter, gain, phase latch registers) plus
// one for the table read; dac_out follows the loop filter by one clock.
// Synchronous active-high reset.
module dfm_demodulator
  import dfm_pkg::*;
#(
  parameter int               ACC_W     = 24,
  parameter int               ADDR_W    = 14,
  parameter logic [ACC_W-1:0] FCW_RESET = '0
) (
  input  logic             clk,
  input  logic             rst,
  input  sample_t          adc_in,     // digital FM from the ADC
  input  gain_t            gain,       // loop gain factor
  input  logic             ser_data,   // free-running frequency word, serial
  input  logic             ser_shift,
  input  logic             ser_load,
  output sample_t          dac_out,    // message to the DAC
  output sample_t          pd_err,     // phase detector output
  output lf_t              lf_d1,      // loop filter outputs
  output lf_t              lf_d2,
  output ctrl_t            dfg_ctrl,   // gain output
  output sample_t          dfg_cos,    // DFG cosine
  output sample_t          dfg_sin,    // DFG sine
  output logic [ACC_W-1:0] dfg_fcw,    // active free-running frequency word
  output logic [ACC_W-1:0] dfg_phase   // DFG phase latch
);
  phase_detector u_pd (
    .clk(clk), .rst(rst), .m_in(adc_in), .u_in(dfg_cos), .e_out(pd_err));

  loop_filter u_lf (
    .clk(clk), .reset(rst), .c(pd_err), .d1(lf_d1), .d2(lf_d2));

  loop_gain u_gain (
    .clk(clk), .rst(rst), .d(lf_d1), .gain(gain), .ctrl(dfg_ctrl));

  dfg #(.ACC_W(ACC_W), .ADDR_W(ADDR_W), .FCW_RESET(FCW_RESET)) u_dfg (
    .clk(clk), .rst(rst), .ser_data(ser_data), .ser_shift(ser_shift),
    .ser_load(ser_load), .ctrl(dfg_ctrl), .phase(dfg_phase), .fcw(dfg_fcw),
    .cos_out(dfg_cos), .sin_out(dfg_sin));

  fir_filter #(.IN_W(LF_W), .OUT_W(SAMPLE_W)) u_fir (
    .clk(clk), .rst(rst), .x(lf_d2), .y(dac_out));
endmodule
