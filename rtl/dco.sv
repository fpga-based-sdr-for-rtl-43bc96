// dco: digitally controlled oscillator of the pixel-clock DPLL, realised as
// an all-digital phase accumulator clocked by the system clock. Each clock
// the 16-bit code is added to an ACC_W-bit accumulator; the accumulator MSB
// is the output clock CKOUT, whose frequency is
//     f_ckout = code * f_clk / 2**ACC_W      (at most f_clk / 2)
// and ck_rise marks the clocks in which CKOUT rises, for logic that counts
// its edges in the system clock domain. The 16-bit input is the document's;
// the accumulator realisation is this design's choice (the document names
// the DCO without describing it).
// Timing: ckout and ck_rise are registered.
module dco #(
  parameter int CODE_W = 16,
  parameter int ACC_W  = 17
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [CODE_W-1:0] code,
  output logic              ckout,
  output logic              ck_rise
);
  logic [ACC_W-1:0] acc, acc_n;

  always_comb acc_n = acc + ACC_W'(code);

  always_ff @(posedge clk) begin
    if (rst) begin
      acc     <= '0;
      ck_rise <= 1'b0;
    end else begin
      acc     <= acc_n;
      ck_rise <= acc_n[ACC_W-1] & ~acc[ACC_W-1];
    end
  end

  assign ckout = acc[ACC_W-1];
endmodule
