// fir_filter: finite impulse response filter on the message path of the
// DPLL FM demodulator. It smooths the loop filter's coarse output (d2) and
// reduces it to the 8-bit word for the DAC:
//     y[n] = sat( (sum_k COEF[k] * x[n-k]) >>> SHIFT )
// The FIR structure and the 12-bit input / 8-bit output widths follow the
// document; the order and coefficients are not given there, so the default
// is this design's: a 5-tap binomial low-pass (1 4 6 4 1)/16, followed by a
// further /16 that keeps the 8 significant bits of the 12-bit word.
// Timing: direct form, the input is sampled every clock and y is registered,
// so an input reaches y one clock later and the impulse response lasts
// NTAPS clocks. Synchronous active-high reset clears the delay line.
module fir_filter #(
  parameter int NTAPS = 5,
  parameter int IN_W  = 12,
  parameter int OUT_W = 8,
  parameter int COEF_W = 8,
  parameter logic signed [COEF_W-1:0] COEF [NTAPS] = '{8'sd1, 8'sd4, 8'sd6, 8'sd4, 8'sd1},
  parameter int SHIFT = 8
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic signed [IN_W-1:0]  x,
  output logic signed [OUT_W-1:0] y
);
  localparam int ACC_W = IN_W + COEF_W + $clog2(NTAPS) + 1;
  localparam logic signed [ACC_W-1:0] MAXV = ACC_W'(2 ** (OUT_W - 1) - 1);
  localparam logic signed [ACC_W-1:0] MINV = -ACC_W'(2 ** (OUT_W - 1));

  logic signed [IN_W-1:0]  dly [NTAPS];   // dly[0] is the current input
  logic signed [ACC_W-1:0] acc, scaled;
  logic signed [OUT_W-1:0] sat;

  always_comb begin
    dly[0] = x;
    acc    = '0;
    for (int k = 0; k < NTAPS; k++)
      acc += ACC_W'(dly[k]) * ACC_W'(COEF[k]);
    scaled = acc >>> SHIFT;
    if (scaled > MAXV)      sat = OUT_W'(MAXV);
    else if (scaled < MINV) sat = OUT_W'(MINV);
    else                    sat = OUT_W'(scaled);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 1; k < NTAPS; k++) dly[k] <= '0;
      y <= '0;
    end else begin
      for (int k = 1; k < NTAPS; k++) dly[k] <= dly[k-1];
      y <= sat;
    end
  end
endmodule
