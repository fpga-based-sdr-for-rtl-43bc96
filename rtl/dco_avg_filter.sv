// dco_avg_filter: the digital filter of the pixel-clock DPLL that returns
// avg_dco_code, a running average of the controller's dco_code, to the
// controller. It is a first-order recursive average, updated once per
// phase comparison (en):
//     avg <= avg + ((dco_code - avg) >>> AVG_SHIFT)
// i.e. an exponential average over about 2**AVG_SHIFT comparisons. The
// 19-bit width is the document's; the averaging law and its length are
// this design's choices (the document shows the filter's connections only).
// Timing: avg_dco_code is registered and updates the clock after en.
// Synchronous active-high reset loads INIT.
module dco_avg_filter #(
  parameter int                CODE_W    = 19,
  parameter int                AVG_SHIFT = 4,
  parameter logic [CODE_W-1:0] INIT      = CODE_W'(1 << (CODE_W - 3))
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              en,
  input  logic [CODE_W-1:0] dco_code,
  output logic [CODE_W-1:0] avg_dco_code
);
  logic signed [CODE_W:0] diff;

  always_comb diff = $signed({1'b0, dco_code}) - $signed({1'b0, avg_dco_code});

  always_ff @(posedge clk) begin
    if (rst)     avg_dco_code <= INIT;
    else if (en) avg_dco_code <= avg_dco_code + CODE_W'(diff >>> AVG_SHIFT);
  end
endmodule
