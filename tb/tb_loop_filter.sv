// tb_loop_filter: checks the loop filter against the published simulation
// trace (input 16 then 1 after reset; d1 = 32 64 94 122 149 144 137 130 124
// 118 113 108 103, d2 = the same with the four LSBs cleared) and then against
// an independent model of the recurrence d1' = d1 + 2c - (d1_prev >>> 4)
// with saturation, over random inputs including the 12-bit limits.
module tb_loop_filter;
  import dfm_pkg::*;
  logic    clk = 1'b0;
  logic    reset;
  sample_t c;
  lf_t     d1, d2;
  int      checks = 0, failures = 0;

  loop_filter dut (.clk(clk), .reset(reset), .c(c), .d1(d1), .d2(d2));

  always #10 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int got, int exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  int trace_d1 [13] = '{32, 64, 94, 122, 149, 144, 137, 130, 124, 118, 113, 108, 103};
  int m_d1, m_prev, nxt;

  initial begin
    reset = 1'b1;
    c     = 8'sd17;
    repeat (3) @(posedge clk);
    #1;
    check(int'(d1), 0, "d1 in reset");
    check(int'(d2), 0, "d2 in reset");
    c = 8'sd16;
    reset = 1'b0;
    // published trace: five clocks of c = 16, then c = 1
    for (int i = 0; i < 13; i++) begin
      if (i == 5) c = 8'sd1;
      @(posedge clk);
      #1;
      check(int'(d1), trace_d1[i], $sformatf("trace d1[%0d]", i));
      check(int'(d2), (trace_d1[i] / 16) * 16, $sformatf("trace d2[%0d]", i));
    end
    // random inputs against the model
    reset = 1'b1;
    @(posedge clk);
    #1;
    reset = 1'b0;
    m_d1 = 0;
    m_prev = 0;
    for (int i = 0; i < 3000; i++) begin
      if (i < 1000)      c = sample_t'($urandom_range(0, 255));
      else if (i < 2000) c = sample_t'($urandom_range(100, 127));      // drive to +limit
      else               c = sample_t'(-$urandom_range(100, 128));     // drive to -limit
      nxt = m_d1 + 2 * int'(c) - (m_prev >>> 4);
      if (nxt > 2047)  nxt = 2047;
      if (nxt < -2048) nxt = -2048;
      m_prev = m_d1;
      m_d1   = nxt;
      @(posedge clk);
      #1;
      check(int'(d1), m_d1, "random d1");
      check(int'(d2), m_d1 & ~15, "random d2");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
