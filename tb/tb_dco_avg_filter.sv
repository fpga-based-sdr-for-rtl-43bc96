// tb_dco_avg_filter: random codes and enables against the model
// avg += (code - avg) >>> 4, then a constant code to which avg must settle.
module tb_dco_avg_filter;
  logic        clk = 1'b0, rst, en;
  logic [18:0] code, avg;
  int          checks = 0, failures = 0;
  int          m;

  dco_avg_filter dut (.clk(clk), .rst(rst), .en(en), .dco_code(code), .avg_dco_code(avg));

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1;
    en = 1'b0;
    code = '0;
    @(posedge clk);
    #1;
    rst = 1'b0;
    m = 65536;
    checks++;
    if (int'(avg) != m) failures++;
    for (int i = 0; i < 3000; i++) begin
      code = (i < 2500) ? 19'($urandom) : 19'd300000;
      en = 1'($urandom_range(0, 3) != 0);
      if (en) m = m + ((int'(code) - m) >>> 4);
      @(posedge clk);
      #1;
      checks++;
      if (int'(avg) != m) begin
        failures++;
        $display("FAIL avg=%0d exp=%0d", avg, m);
      end
    end
    checks++;
    if (int'(avg) < 300000 - 16 || int'(avg) > 300000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
