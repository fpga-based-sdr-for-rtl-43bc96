// pll_controller: loop controller of the pixel-clock DPLL. After each phase
// comparison (tdc_valid) it turns the signed phase error e = +tdc_code when
// the reference led (UP pulse) or -tdc_code when it lagged (DN pulse) into
// the 19-bit DCO code with a proportional-integral law:
//     integ    <= integ + (e << KI_SHIFT)
//     dco_code <= base  + (e << KP_SHIFT)
// where base is integ while unlocked and avg_dco_code, the digital filter's
// running average of dco_code, once locked. Lock is declared after LOCK_CNT
// consecutive comparisons with |e| <= LOCK_TOL and dropped by the first
// larger error; using the averaged code when locked keeps the output
// frequency steady against a noisy, low-rate reference. The ports
// (tdc_code, avg_dco_code, dco_code and their 7/19-bit widths) are the
// document's; the document names the controller without describing it, so
// the control law, the lock detector and all constants are this design's.
// Timing: dco_code, integ and locked update in the clock after tdc_valid;
// all sums saturate at 0 and 2**CODE_W-1. Synchronous active-high reset
// loads DCO_INIT.
module pll_controller #(
  parameter int                CODE_W   = 19,
  parameter int                TDC_W    = 7,
  parameter int                KP_SHIFT = 8,
  parameter int                KI_SHIFT = 4,
  parameter int                LOCK_TOL = 2,
  parameter int                LOCK_CNT = 8,
  parameter logic [CODE_W-1:0] DCO_INIT = CODE_W'(1 << (CODE_W - 3))
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [TDC_W-1:0]  tdc_code,
  input  logic              tdc_lead,      // 1: the reference led (UP)
  input  logic              tdc_valid,
  input  logic [CODE_W-1:0] avg_dco_code,
  output logic [CODE_W-1:0] dco_code,
  output logic              locked
);
  localparam int S_W = CODE_W + 2;
  localparam logic signed [S_W-1:0] MAXV = S_W'(2 ** CODE_W - 1);

  logic [CODE_W-1:0]       integ, integ_n, base, dco_n;
  logic signed [S_W-1:0]   e, i_sum, p_sum;
  logic [$clog2(LOCK_CNT+1)-1:0] good;
  logic                    err_small;

  function automatic logic [CODE_W-1:0] clamp(logic signed [S_W-1:0] v);
    if (v < 0)         return '0;
    else if (v > MAXV) return CODE_W'(MAXV);
    else               return CODE_W'(v);
  endfunction

  always_comb begin
    e       = tdc_lead ? S_W'(tdc_code) : -S_W'(tdc_code);
    i_sum   = S_W'(integ) + (e <<< KI_SHIFT);
    integ_n = clamp(i_sum);
    base    = locked ? avg_dco_code : integ_n;
    p_sum   = S_W'(base) + (e <<< KP_SHIFT);
    dco_n   = clamp(p_sum);
    err_small   = (int'(tdc_code) <= LOCK_TOL);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      integ    <= DCO_INIT;
      dco_code <= DCO_INIT;
      good     <= '0;
      locked   <= 1'b0;
    end else if (tdc_valid) begin
      integ    <= integ_n;
      dco_code <= dco_n;
      if (!err_small) begin
        good   <= '0;
        locked <= 1'b0;
      end else if (int'(good) >= LOCK_CNT - 1) begin
        locked <= 1'b1;
      end else begin
        good   <= good + 1'b1;
      end
    end
  end
endmodule
