// tb_tdc: UP and DN pulses of random widths; after each pulse valid must
// pulse once with code = width (saturated at 127) and lead = 1 for UP.
module tb_tdc;
  logic       clk = 1'b0, rst, up, dn, lead, valid;
  logic [6:0] code;
  int         checks = 0, failures = 0;
  int         nvalid;

  tdc dut (.clk(clk), .rst(rst), .up(up), .dn(dn), .code(code), .lead(lead), .valid(valid));

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (valid) nvalid++;

  task automatic pulse(int w, bit is_up);
    int exp_c = (w > 127) ? 127 : w;
    nvalid = 0;
    up = is_up;
    dn = !is_up;
    repeat (w) @(posedge clk);
    #1;
    up = 1'b0;
    dn = 1'b0;
    @(posedge clk);
    #1;
    checks++;
    if (!valid || code != 7'(exp_c) || lead != is_up) begin
      failures++;
      $display("FAIL w=%0d up=%0d valid=%0d code=%0d lead=%0d", w, is_up, valid, code, lead);
    end
    repeat (5) @(posedge clk);
    #1;
    checks++;
    if (nvalid != 1) begin
      failures++;
      $display("FAIL %0d valid pulses", nvalid);
    end
  endtask

  initial begin
    rst = 1'b1;
    up = 1'b0;
    dn = 1'b0;
    repeat (2) @(posedge clk);
    #1;
    rst = 1'b0;
    pulse(1, 1'b1);
    pulse(127, 1'b0);
    pulse(200, 1'b1);
    for (int i = 0; i < 200; i++) pulse($urandom_range(1, 150), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
