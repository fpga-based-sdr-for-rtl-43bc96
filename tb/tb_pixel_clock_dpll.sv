// tb_pixel_clock_dpll: closed-loop test of the pixel-clock DPLL. An HSYNC of
// period 240 clocks is applied with N = 16, then N = 12 and then N = 20.
// After each change the loop must declare lock, and over the following 16
// HSYNC periods CKOUT must give N edges per period (within 2 edges in all)
// with no phase comparison wider than 2 clocks. The run counts UP pulses,
// DN pulses, lock entries, lock losses and delta-sigma dithering (the DCO
// input changing while dco_code holds) and fails if any never happened.
module tb_pixel_clock_dpll;
  logic        clk = 1'b0, rst, hsync, ckout, hsout, up, dn, locked;
  logic [11:0] n_div;
  logic [6:0]  tdc_code;
  logic [18:0] dco_code, avg_code;
  logic [15:0] dco_in;
  int          checks = 0, failures = 0;
  int          n_up, n_dn, n_lock, n_unlock, n_dither, edges, worst, t;
  logic        up_q, dn_q, lk_q, ck_q;
  logic [18:0] code_q;
  logic [15:0] in_q;

  localparam int PERIOD = 240;

  pixel_clock_dpll dut (.clk(clk), .rst(rst), .hsync(hsync), .n_div(n_div),
    .ckout(ckout), .hsout(hsout), .up(up), .dn(dn), .tdc_code(tdc_code),
    .dco_code(dco_code), .avg_dco_code(avg_code), .dco_in(dco_in), .locked(locked));

  always #5 clk = ~clk;

  initial begin
    #200000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // HSYNC: 20 clocks high every PERIOD clocks
  always @(posedge clk) begin
    if (rst) t <= 0;
    else     t <= (t == PERIOD - 1) ? 0 : t + 1;
  end
  assign hsync = (t < 20);

  always @(posedge clk) begin
    if (!rst) begin
      if (up && !up_q) n_up++;
      if (dn && !dn_q) n_dn++;
      if (locked && !lk_q) n_lock++;
      if (!locked && lk_q) n_unlock++;
      if (dco_code == code_q && dco_in != in_q) n_dither++;
      if (ckout && !ck_q) edges++;
    end
    up_q <= up; dn_q <= dn; lk_q <= locked; ck_q <= ckout;
    code_q <= dco_code; in_q <= dco_in;
  end

  task automatic run_ratio(int n);
    int waited = 0;
    n_div = 12'(n);
    // wait for lock (the previous lock is lost first when N changes)
    repeat (4 * PERIOD) @(posedge clk);
    while (!locked && waited < 2000) begin
      repeat (PERIOD) @(posedge clk);
      waited++;
    end
    checks++;
    if (!locked) begin
      failures++;
      $display("FAIL N=%0d no lock", n);
    end
    repeat (8 * PERIOD) @(posedge clk);
    edges = 0;
    worst = 0;
    repeat (16) begin
      repeat (PERIOD) begin
        @(posedge clk);
      end
      if (int'(tdc_code) > worst) worst = int'(tdc_code);
    end
    checks += 2;
    if (edges < 16 * n - 2 || edges > 16 * n + 2) begin
      failures++;
      $display("FAIL N=%0d %0d CKOUT edges in 16 periods", n, edges);
    end
    if (worst > 2) begin
      failures++;
      $display("FAIL N=%0d phase error %0d", n, worst);
    end
    $display("N=%0d: lock after %0d periods, %0d edges, dco_code %0d avg %0d", n, waited + 4, edges, dco_code, avg_code);
  endtask

  initial begin
    n_up = 0; n_dn = 0; n_lock = 0; n_unlock = 0; n_dither = 0; edges = 0;
    rst = 1'b1;
    n_div = 12'd16;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    run_ratio(16);
    run_ratio(12);
    run_ratio(20);
    $display("UP %0d DN %0d lock %0d unlock %0d dither %0d", n_up, n_dn, n_lock, n_unlock, n_dither);
    checks += 5;
    if (n_up == 0)     begin failures++; $display("FAIL no UP pulse"); end
    if (n_dn == 0)     begin failures++; $display("FAIL no DN pulse"); end
    if (n_lock < 3)    begin failures++; $display("FAIL lock entered %0d times", n_lock); end
    if (n_unlock == 0) begin failures++; $display("FAIL lock never lost"); end
    if (n_dither == 0) begin failures++; $display("FAIL no delta-sigma dithering"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
