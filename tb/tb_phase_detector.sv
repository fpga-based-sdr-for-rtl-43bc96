// tb_phase_detector: random and corner samples; the output must be the
// signed product divided by 128 (floor) and saturated, one clock later.
module tb_phase_detector;
  import dfm_pkg::*;
  logic    clk = 1'b0, rst;
  sample_t m, u, e;
  int      checks = 0, failures = 0;
  int      exp_q;

  phase_detector dut (.clk(clk), .rst(rst), .m_in(m), .u_in(u), .e_out(e));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int model(int a, int b);
    int p = a * b;
    int q = (p >= 0) ? p / 128 : -((-p + 127) / 128);  // floor division
    if (q > 127)  q = 127;
    if (q < -128) q = -128;
    return q;
  endfunction

  initial begin
    rst = 1'b1;
    m = '0;
    u = '0;
    @(posedge clk);
    #1;
    checks++;
    if (e != 0) failures++;
    rst = 1'b0;
    for (int i = 0; i < 4000; i++) begin
      case (i)
        0: begin m = -8'sd128; u = -8'sd128; end
        1: begin m = 8'sd127;  u = -8'sd128; end
        2: begin m = 8'sd127;  u = 8'sd127;  end
        3: begin m = -8'sd1;   u = 8'sd1;    end
        default: begin m = sample_t'($urandom); u = sample_t'($urandom); end
      endcase
      exp_q = model(int'(m), int'(u));
      @(posedge clk);
      #1;
      checks++;
      if (int'(e) != exp_q) begin
        failures++;
        $display("FAIL m=%0d u=%0d e=%0d exp=%0d", m, u, e, exp_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
