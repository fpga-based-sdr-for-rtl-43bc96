// tb_sine_rom: reads every address of the full period and compares the
// output, one clock later, with round(127 * sin(2*pi*(a + 0.5) / 16384))
// (rounded half away from zero), computed here in floating point.
module tb_sine_rom;
  logic               clk = 1'b0;
  logic [13:0]        addr;
  logic signed [7:0]  amp;
  int                 checks = 0, failures = 0;
  int                 exp_v, maxv, minv;
  real                v;

  sine_rom dut (.clk(clk), .addr(addr), .amp(amp));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    maxv = -1000;
    minv = 1000;
    for (int a = 0; a < 16384; a++) begin
      addr = 14'(a);
      v = 127.0 * $sin(2.0 * 3.14159265358979323846 * (real'(a) + 0.5) / 16384.0);
      exp_v = (v >= 0.0) ? $rtoi(v + 0.5) : -$rtoi(-v + 0.5);
      @(posedge clk);
      #1;
      checks++;
      if (int'(amp) != exp_v) begin
        failures++;
        if (failures < 10) $display("FAIL addr=%0d amp=%0d exp=%0d", a, amp, exp_v);
      end
      if (amp > maxv) maxv = amp;
      if (amp < minv) minv = amp;
    end
    checks++;
    if (maxv != 127 || minv != -127) begin
      failures++;
      $display("FAIL range %0d..%0d", minv, maxv);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
