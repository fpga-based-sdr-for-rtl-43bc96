// tb_loop_gain: random and extreme loop filter words and gain factors; the
// 18-bit control word must equal their signed product one clock later.
module tb_loop_gain;
  import dfm_pkg::*;
  logic  clk = 1'b0, rst;
  lf_t   d;
  gain_t g;
  ctrl_t ctrl;
  int    checks = 0, failures = 0;
  int    exp_v;

  loop_gain dut (.clk(clk), .rst(rst), .d(d), .gain(g), .ctrl(ctrl));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1;
    d = '0;
    g = '0;
    @(posedge clk);
    #1;
    rst = 1'b0;
    for (int i = 0; i < 3000; i++) begin
      case (i)
        0: begin d = -12'sd2048; g = 6'd63; end
        1: begin d = 12'sd2047;  g = 6'd63; end
        default: begin d = lf_t'($urandom); g = gain_t'($urandom); end
      endcase
      exp_v = int'(d) * int'(g);
      @(posedge clk);
      #1;
      checks++;
      if (int'(ctrl) != exp_v) begin
        failures++;
        $display("FAIL d=%0d g=%0d ctrl=%0d exp=%0d", d, g, ctrl, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
