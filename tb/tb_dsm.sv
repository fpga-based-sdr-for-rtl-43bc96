// tb_dsm: for constant inputs the 16-bit output must take only the integer
// part or one more, and over every 8 clocks its sum must be exactly
// 8*integer + fraction (first-order noise shaping, average = input).
module tb_dsm;
  logic        clk = 1'b0, rst;
  logic [18:0] in;
  logic [15:0] out;
  int          checks = 0, failures = 0;
  int          sum, intg, frac;

  dsm dut (.clk(clk), .rst(rst), .in(in), .out(out));

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1;
    in = '0;
    @(posedge clk);
    #1;
    rst = 1'b0;
    for (int t = 0; t < 300; t++) begin
      in = (t == 0) ? 19'h7FFFF : 19'($urandom);
      intg = int'(in >> 3);
      frac = int'(in[2:0]);
      @(posedge clk);   // first output with the new input
      #1;
      repeat (8) @(posedge clk);   // let the accumulator reach a whole cycle
      #1;
      sum = 0;
      for (int k = 0; k < 8; k++) begin
        sum += int'(out);
        checks++;
        if (int'(out) != intg && !(int'(out) == intg + 1 && intg != 65535)) begin
          failures++;
          $display("FAIL out=%0d int=%0d", out, intg);
        end
        @(posedge clk);
        #1;
      end
      checks++;
      if (intg != 65535 && sum != 8 * intg + frac) begin
        failures++;
        $display("FAIL sum=%0d exp=%0d", sum, 8 * intg + frac);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
