// tb_pll_controller: random phase errors against a model of the
// proportional-integral law, the lock detector (8 small errors in a row) and
// the switch to the averaged code when locked; also saturation at 0.
module tb_pll_controller;
  logic        clk = 1'b0, rst, lead, valid, locked;
  logic [6:0]  code;
  logic [18:0] avg, dco;
  int          checks = 0, failures = 0;
  int          m_int, m_dco, m_good, e, base, nlock;
  bit          m_locked;

  pll_controller dut (.clk(clk), .rst(rst), .tdc_code(code), .tdc_lead(lead),
    .tdc_valid(valid), .avg_dco_code(avg), .dco_code(dco), .locked(locked));

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int clamp(int v);
    if (v < 0) return 0;
    if (v > 524287) return 524287;
    return v;
  endfunction

  task automatic event_(int c, bit l);
    code  = 7'(c);
    lead  = l;
    avg   = 19'($urandom_range(60000, 70000));
    valid = 1'b1;
    e = l ? c : -c;
    m_int = clamp(m_int + e * 16);
    base  = m_locked ? int'(avg) : m_int;
    m_dco = clamp(base + e * 256);
    if (c > 2) begin
      m_good = 0;
      m_locked = 0;
    end else if (m_good >= 7) m_locked = 1;
    else m_good++;
    @(posedge clk);
    #1;
    valid = 1'b0;
    checks++;
    if (int'(dco) != m_dco || locked != m_locked) begin
      failures++;
      $display("FAIL c=%0d lead=%0d dco=%0d exp=%0d locked=%0d exp=%0d", c, l, dco, m_dco, locked, m_locked);
    end
    if (locked) nlock++;
    code = 7'($urandom);  // ignored without valid
    repeat ($urandom_range(0, 3)) begin
      @(posedge clk);
      #1;
      checks++;
      if (int'(dco) != m_dco) failures++;
    end
  endtask

  initial begin
    rst = 1'b1;
    valid = 1'b0;
    code = '0;
    lead = 1'b0;
    avg = '0;
    m_int = 65536;
    m_dco = 65536;
    m_good = 0;
    m_locked = 0;
    nlock = 0;
    repeat (2) @(posedge clk);
    #1;
    rst = 1'b0;
    checks++;
    if (dco != 19'd65536) failures++;
    for (int i = 0; i < 2000; i++) begin
      if ((i / 100) % 2 == 1) event_($urandom_range(0, 2), 1'($urandom));   // lock phases
      else                    event_($urandom_range(0, 127), 1'($urandom));
    end
    for (int i = 0; i < 100; i++) event_(127, 1'b0);                       // drive to 0
    checks++;
    if (nlock == 0) begin
      failures++;
      $display("FAIL never locked");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
