// tb_fir_filter: impulse response (1 4 6 4 1 scaled by 1/256, one clock of
// latency) and random inputs against a convolution model with saturation.
module tb_fir_filter;
  logic              clk = 1'b0, rst;
  logic signed [11:0] x;
  logic signed [7:0]  y;
  int                 checks = 0, failures = 0;
  int                 hist [5];
  int                 coef [5] = '{1, 4, 6, 4, 1};
  int                 acc, q;

  fir_filter dut (.clk(clk), .rst(rst), .x(x), .y(y));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int floordiv256(int v);
    return (v >= 0) ? v / 256 : -((-v + 255) / 256);
  endfunction

  task automatic step(int xin);
    for (int k = 4; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = xin;
    acc = 0;
    for (int k = 0; k < 5; k++) acc += coef[k] * hist[k];
    q = floordiv256(acc);
    if (q > 127) q = 127;
    if (q < -128) q = -128;
    x = 12'(xin);
    @(posedge clk);
    #1;
    checks++;
    if (int'(y) != q) begin
      failures++;
      $display("FAIL x=%0d y=%0d exp=%0d", xin, y, q);
    end
  endtask

  initial begin
    rst = 1'b1;
    x = '0;
    foreach (hist[k]) hist[k] = 0;
    repeat (2) @(posedge clk);
    #1;
    rst = 1'b0;
    // impulse of 2048: response 8 32 48 32 8 then 0
    step(-2048);
    for (int i = 0; i < 6; i++) step(0);
    step(2032);
    for (int i = 0; i < 6; i++) step(0);
    for (int i = 0; i < 3000; i++) step($urandom_range(0, 4095) - 2048);
    for (int i = 0; i < 20; i++) step(2047);
    for (int i = 0; i < 20; i++) step(-2048);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
