// sdr_dpll_top: the two DPLL designs side by side. dfm_demodulator is the
// software-defined-radio FM receiver (digitised FM in, message samples out
// to a DAC); pixel_clock_dpll regenerates a pixel clock from a video HSYNC.
// They share only the system clock and reset; each has its own ports.
// All parameters take the defaults of the two designs.
module sdr_dpll_top
  import dfm_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // FM demodulator
  input  sample_t     adc_in,
  input  gain_t       gain,
  input  logic        ser_data,
  input  logic        ser_shift,
  input  logic        ser_load,
  output sample_t     dac_out,
  output sample_t     pd_err,
  output lf_t         lf_d1,
  output lf_t         lf_d2,
  output ctrl_t       dfg_ctrl,
  output sample_t     dfg_cos,
  output sample_t     dfg_sin,
  output logic [23:0] dfg_fcw,
  output logic [23:0] dfg_phase,
  // pixel-clock DPLL
  input  logic        hsync,
  input  logic [11:0] n_div,
  output logic        ckout,
  output logic        hsout,
  output logic        up,
  output logic        dn,
  output logic [6:0]  tdc_code,
  output logic [18:0] dco_code,
  output logic [18:0] avg_dco_code,
  output logic [15:0] dco_in,
  output logic        locked
);
  dfm_demodulator u_demod (
    .clk(clk), .rst(rst), .adc_in(adc_in), .gain(gain), .ser_data(ser_data),
    .ser_shift(ser_shift), .ser_load(ser_load), .dac_out(dac_out),
    .pd_err(pd_err), .lf_d1(lf_d1), .lf_d2(lf_d2), .dfg_ctrl(dfg_ctrl),
    .dfg_cos(dfg_cos), .dfg_sin(dfg_sin), .dfg_fcw(dfg_fcw), .dfg_phase(dfg_phase));

  pixel_clock_dpll u_pll (
    .clk(clk), .rst(rst), .hsync(hsync), .n_div(n_div), .ckout(ckout),
    .hsout(hsout), .up(up), .dn(dn), .tdc_code(tdc_code),
    .dco_code(dco_code), .avg_dco_code(avg_dco_code), .dco_in(dco_in),
    .locked(locked));
endmodule
