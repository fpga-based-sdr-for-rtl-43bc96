// tb_dco: for several codes counts CKOUT rising edges over 2**17 clocks;
// the count must equal the code (f = code * f_clk / 2**17), and ck_rise must
// coincide with CKOUT rising.
module tb_dco;
  logic        clk = 1'b0, rst, ckout, ck_rise, ck_q;
  logic [15:0] code;
  int          checks = 0, failures = 0;
  int          edges, strobes;
  int          codes [4] = '{1000, 8192, 30000, 65535};

  dco dut (.clk(clk), .rst(rst), .code(code), .ckout(ckout), .ck_rise(ck_rise));

  always #5 clk = ~clk;

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (codes[i]) begin
      rst = 1'b1;
      code = 16'(codes[i]);
      @(posedge clk);
      #1;
      rst = 1'b0;
      ck_q = ckout;
      edges = 0;
      strobes = 0;
      repeat (131072) begin
        @(posedge clk);
        #1;
        if (ckout && !ck_q) edges++;
        if (ck_rise) strobes++;
        checks++;
        if (ck_rise != (ckout && !ck_q)) failures++;
        ck_q = ckout;
      end
      checks++;
      if (edges != codes[i] || strobes != codes[i]) begin
        failures++;
        $display("FAIL code=%0d edges=%0d strobes=%0d", codes[i], edges, strobes);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
