// sine_rom: the waveform table ("EPROM") of the digital frequency generator,
// stored as one quarter of a sine wave. A full period has 2**ADDR_W samples
// (16384 by default, the size of the document's 16 KB sine table); quarter-
// wave symmetry lets the table hold only the first 2**(ADDR_W-2) = 4096
// magnitudes. The two address MSBs select the quadrant: bit ADDR_W-2 mirrors
// the index (second and fourth quarter), bit ADDR_W-1 negates the result
// (second half). The table entry for index k is
//     round((2**(AMP_W-1) - 1) * sin(2*pi*(k + 0.5) / 2**ADDR_W))
// computed at elaboration; the half-sample offset makes the mirrored
// quarters exact. The output is signed two's complement, symmetric about
// zero (+-127 for 8 bits). Quarter-wave storage follows the document; the
// half-sample offset and the rounding are this design's choices.
// Timing: one registered read, amp is valid one clock after addr.
module sine_rom #(
  parameter int ADDR_W = 14,  // phase bits of a full period
  parameter int AMP_W  = 8    // output amplitude bits, signed
) (
  input  logic                    clk,
  input  logic [ADDR_W-1:0]       addr,
  output logic signed [AMP_W-1:0] amp
);
  localparam int QN    = 2 ** (ADDR_W - 2);
  localparam int MAG_W = AMP_W - 1;

  typedef logic [MAG_W-1:0] mag_t;
  function automatic mag_t entry(int k);
    real x;
    x = $sin(2.0 * 3.14159265358979323846 * (real'(k) + 0.5) / real'(4 * QN));
    return mag_t'($rtoi(x * real'(2 ** MAG_W - 1) + 0.5));
  endfunction

  // constant table, one elaboration-time entry per index
  mag_t tbl [QN];
  for (genvar k = 0; k < QN; k++) begin : g_tbl
    localparam mag_t V = entry(k);
    assign tbl[k] = V;
  end

  logic [ADDR_W-3:0] idx;
  mag_t              mag;

  always_comb begin
    idx = addr[ADDR_W-2] ? ~addr[ADDR_W-3:0] : addr[ADDR_W-3:0];
    mag = tbl[idx];
  end

  always_ff @(posedge clk) begin
    if (addr[ADDR_W-1]) amp <= -$signed({1'b0, mag});
    else                amp <= $signed({1'b0, mag});
  end
endmodule
