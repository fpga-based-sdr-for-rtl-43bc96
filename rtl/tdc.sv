// tdc: time-to-digital converter of the pixel-clock DPLL. It measures the
// width of the phase detector's UP or DN pulse, that is the time between the
// reference and feedback edges, and reports it as a 7-bit code. The 7-bit
// width is the document's; the resolution of one system clock (a counter,
// the simplest TDC an FPGA fabric offers, in place of a delay line) and the
// saturation at 127 are this design's choices.
// Interface: code holds the last measurement; valid pulses for one clock
// when a pulse has ended and code has been updated, and lead tells whether
// it was an UP pulse (reference ahead of the feedback).
// Timing: a pulse of W clocks gives code = W (saturated), valid the clock
// after the pulse falls.
module tdc #(
  parameter int CODE_W = 7
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              up,
  input  logic              dn,
  output logic [CODE_W-1:0] code,
  output logic              lead,   // 1: measured an UP pulse
  output logic              valid
);
  localparam logic [CODE_W-1:0] MAXC = '1;

  logic [CODE_W-1:0] cnt;
  logic              busy, was_up;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt    <= '0;
      busy   <= 1'b0;
      was_up <= 1'b0;
      code   <= '0;
      lead   <= 1'b0;
      valid  <= 1'b0;
    end else begin
      valid <= 1'b0;
      if (up || dn) begin
        busy   <= 1'b1;
        was_up <= up;
        if (cnt != MAXC) cnt <= cnt + 1'b1;
      end else if (busy) begin
        busy  <= 1'b0;
        code  <= cnt;
        lead  <= was_up;
        valid <= 1'b1;
        cnt   <= '0;
      end
    end
  end

  // a measurement is announced by a single-clock valid pulse
  a_valid_pulse: assert property (@(posedge clk) disable iff (rst) valid |=> !valid);
endmodule
