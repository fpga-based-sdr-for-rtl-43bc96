// dsm: first-order delta-sigma modulator between the PLL controller and the
// DCO. The 19-bit DCO code carries IN_W-OUT_W = 3 fractional bits that the
// 16-bit DCO input cannot take; the modulator accumulates them and adds the
// accumulator's carry to the 16-bit integer part, so the average of the
// output equals the fractional input. The 19-bit input, 16-bit output and
// first order are printed on the document's diagram; the error-feedback
// (accumulator and carry) form is the usual first-order one. The output
// saturates instead of wrapping when the integer part is already all ones.
// Timing: out is registered and updated every clock.
module dsm #(
  parameter int IN_W  = 19,
  parameter int OUT_W = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [IN_W-1:0]  in,
  output logic [OUT_W-1:0] out
);
  localparam int FRAC_W = IN_W - OUT_W;

  logic [FRAC_W-1:0] acc;
  logic [FRAC_W:0]   sum;
  logic [OUT_W-1:0]  intg;

  always_comb begin
    sum  = {1'b0, acc} + {1'b0, in[FRAC_W-1:0]};
    intg = in[IN_W-1:FRAC_W];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      acc <= '0;
      out <= '0;
    end else begin
      acc <= sum[FRAC_W-1:0];
      if (sum[FRAC_W] && intg != '1) out <= intg + 1'b1;
      else                           out <= intg;
    end
  end
endmodule
