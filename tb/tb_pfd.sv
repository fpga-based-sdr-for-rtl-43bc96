// tb_pfd: drives HSYNC and HSOUT edges with known offsets. When HSYNC leads
// by d clocks (after the detector's two extra synchroniser clocks) UP must be
// high for exactly d clocks and DN never; when HSOUT leads, the reverse;
// simultaneous edges give no pulse. UP and DN must never be high together.
module tb_pfd;
  logic clk = 1'b0, rst, hsync, hsout, up, dn;
  int   checks = 0, failures = 0;
  int   up_cnt, dn_cnt;

  pfd dut (.clk(clk), .rst(rst), .hsync(hsync), .hsout(hsout), .up(up), .dn(dn));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (!rst) begin
      if (up) up_cnt++;
      if (dn) dn_cnt++;
      if (up || dn) checks++;
      if (up && dn) begin
        failures++;
        $display("FAIL up and dn together");
      end
    end
  end

  // one comparison: HSYNC rises at clock 0, HSOUT at clock off (HSOUT is
  // seen two clocks earlier than HSYNC, so its effective lead is off - 2)
  task automatic compare(int off);
    int lead = off - 2;
    up_cnt = 0;
    dn_cnt = 0;
    for (int t = -40; t < 80; t++) begin
      hsync = (t >= 0 && t < 30);
      hsout = (t >= off && t < off + 30);
      @(posedge clk);
      #1;
    end
    checks++;
    if (up_cnt != (lead > 0 ? lead : 0) || dn_cnt != (lead < 0 ? -lead : 0)) begin
      failures++;
      $display("FAIL off=%0d up=%0d dn=%0d", off, up_cnt, dn_cnt);
    end
  endtask

  initial begin
    rst = 1'b1;
    hsync = 1'b0;
    hsout = 1'b0;
    repeat (3) @(posedge clk);
    #1;
    rst = 1'b0;
    for (int off = -20; off <= 24; off++) compare(off);
    for (int i = 0; i < 50; i++) compare($urandom_range(0, 60) - 30);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
