// pfd: phase frequency detector of the pixel-clock DPLL, written as
// synchronous logic in the system clock domain. It compares the reference
// HSYNC with the divided-down output HSOUT: a rising edge of HSYNC raises
// UP, a rising edge of HSOUT raises DN, and as soon as both are raised both
// are cleared (the classic tri-state detector). So UP is high from a
// reference edge to the next feedback edge when the reference leads, DN in
// the opposite case, and the pulse width is the phase difference. The
// UP/DN outputs follow the document's diagram; the synchronous realisation,
// the two-flop synchroniser on HSYNC and the edge detection are this
// design's choices.
// Timing: HSYNC edges are seen three clocks after they occur (two
// synchroniser flops and the edge register); HSOUT is already synchronous
// and is seen one clock after it rises. UP/DN are registered.
module pfd (
  input  logic clk,
  input  logic rst,
  input  logic hsync,   // reference, asynchronous
  input  logic hsout,   // feedback, synchronous to clk
  output logic up,
  output logic dn
);
  logic [1:0] ref_sync;
  logic       ref_q, fb_q;
  logic       ref_rise, fb_rise, up_n, dn_n;

  always_comb begin
    ref_rise = ref_sync[1] & ~ref_q;
    fb_rise  = hsout & ~fb_q;
    up_n     = up | ref_rise;
    dn_n     = dn | fb_rise;
    if (up_n && dn_n) begin
      up_n = 1'b0;
      dn_n = 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ref_sync <= '0;
      ref_q    <= 1'b0;
      fb_q     <= 1'b0;
      up       <= 1'b0;
      dn       <= 1'b0;
    end else begin
      ref_sync <= {ref_sync[0], hsync};
      ref_q    <= ref_sync[1];
      fb_q     <= hsout;
      up       <= up_n;
      dn       <= dn_n;
    end
  end

  // the detector is never in the UP and DN state at once
  a_exclusive: assert property (@(posedge clk) disable iff (rst) !(up && dn));
endmodule
