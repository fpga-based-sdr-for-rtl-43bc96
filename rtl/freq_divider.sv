// freq_divider: the 12-bit programmable frequency divider (pre-scaler) that
// divides the DPLL output clock CKOUT by N to give HSOUT, the signal
// compared with HSYNC. N is programmed externally for the display standard.
// It counts CKOUT rising edges (ck_rise strobes, system clock domain) from 0
// to N-1; each strobe sets HSOUT high if the count it sees is below
// ceil(N/2), so HSOUT rises at the strobe that finds the count at 0 (the
// first strobe after reset included). N = 0 or 1 pass every edge as a pulse.
// The 12-bit width and the divide-by-N function are the document's; the
// counting scheme and duty cycle are this design's choices.
// Timing: hsout is registered and changes in the clock after a ck_rise.
module freq_divider #(
  parameter int N_W = 12
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           ck_rise,  // one strobe per CKOUT rising edge
  input  logic [N_W-1:0] n_div,    // division ratio N
  output logic           hsout
);
  logic [N_W-1:0] cnt, cnt_n, half;

  always_comb begin
    half  = N_W'(({1'b0, n_div} + 1'b1) >> 1);
    if (cnt + 1'b1 >= n_div) cnt_n = '0;
    else                     cnt_n = cnt + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt   <= '0;
      hsout <= 1'b0;
    end else if (ck_rise) begin
      cnt   <= cnt_n;
      hsout <= (n_div <= 1) ? 1'b1 : (cnt < half);
    end else if (n_div <= 1) begin
      hsout <= 1'b0;
    end
  end
endmodule
