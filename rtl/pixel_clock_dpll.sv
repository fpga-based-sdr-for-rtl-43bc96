// pixel_clock_dpll: all-digital PLL that regenerates a video pixel clock
// CKOUT from the low-rate horizontal sync HSYNC. CKOUT divided by the
// programmable ratio N gives HSOUT; the phase frequency detector compares
// HSOUT with HSYNC, the TDC digitises the width of its UP/DN pulse, and the
// PLL controller converts that error into a 19-bit DCO code, helped by the
// digital filter's average of that code; a first-order delta-sigma
// modulator reduces the code to the DCO's 16 bits. In lock
//     f_ckout = N * f_hsync.
// The blocks, their connections and the 7/19/16/12-bit widths follow the
// document's DPLL diagram. Everything runs in one system clock domain: the
// DCO is a phase accumulator and CKOUT its MSB, so f_ckout is at most
// f_clk/2 (own choice, see the blocks).
// Timing: one phase comparison per HSYNC period; dco_code changes in the
// clock after each comparison ends. Synchronous active-high reset.
module pixel_clock_dpll #(
  parameter int                KP_SHIFT  = 8,
  parameter int                KI_SHIFT  = 4,
  parameter int                AVG_SHIFT = 4,
  parameter logic [18:0]       DCO_INIT  = 19'(1 << 16)
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        hsync,         // reference
  input  logic [11:0] n_div,         // division ratio, set externally
  output logic        ckout,         // regenerated pixel clock
  output logic        hsout,         // ckout / N
  output logic        up,
  output logic        dn,
  output logic [6:0]  tdc_code,
  output logic [18:0] dco_code,
  output logic [18:0] avg_dco_code,
  output logic [15:0] dco_in,        // delta-sigma output to the DCO
  output logic        locked
);
  logic tdc_lead, tdc_valid, ck_rise;

  pfd u_pfd (
    .clk(clk), .rst(rst), .hsync(hsync), .hsout(hsout), .up(up), .dn(dn));

  tdc #(.CODE_W(7)) u_tdc (
    .clk(clk), .rst(rst), .up(up), .dn(dn), .code(tdc_code),
    .lead(tdc_lead), .valid(tdc_valid));

  pll_controller #(.CODE_W(19), .TDC_W(7), .KP_SHIFT(KP_SHIFT),
                   .KI_SHIFT(KI_SHIFT), .DCO_INIT(DCO_INIT)) u_ctrl (
    .clk(clk), .rst(rst), .tdc_code(tdc_code), .tdc_lead(tdc_lead),
    .tdc_valid(tdc_valid), .avg_dco_code(avg_dco_code),
    .dco_code(dco_code), .locked(locked));

  dco_avg_filter #(.CODE_W(19), .AVG_SHIFT(AVG_SHIFT), .INIT(DCO_INIT)) u_avg (
    .clk(clk), .rst(rst), .en(tdc_valid), .dco_code(dco_code),
    .avg_dco_code(avg_dco_code));

  dsm #(.IN_W(19), .OUT_W(16)) u_dsm (
    .clk(clk), .rst(rst), .in(dco_code), .out(dco_in));

  dco #(.CODE_W(16), .ACC_W(17)) u_dco (
    .clk(clk), .rst(rst), .code(dco_in), .ckout(ckout), .ck_rise(ck_rise));

  freq_divider #(.N_W(12)) u_div (
    .clk(clk), .rst(rst), .ck_rise(ck_rise), .n_div(n_div), .hsout(hsout));
endmodule
