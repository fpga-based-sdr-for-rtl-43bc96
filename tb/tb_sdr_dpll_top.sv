// tb_sdr_dpll_top: end-to-end test of the whole design with every parameter
// at its default. Both designs run at the same time:
//  * FM demodulator: carrier word loaded serially, free-running check with
//    no input, then an FM input whose deviation steps up, down and back; the
//    loop filter and DAC outputs must follow the deviation (d1 = dev/gain).
//  * pixel-clock DPLL: HSYNC every 240 clocks with N = 16, then N = 12; the
//    loop must lock each time and CKOUT must run at N edges per HSYNC.
// Each mechanism is counted: serial word load, free running at zero control,
// positive and negative frequency tracking, UP pulses, DN pulses, lock
// entry, lock loss on the ratio change, use of the averaged DCO code while
// locked, and delta-sigma dithering. A mechanism that never happened counts
// as a failure.
module tb_sdr_dpll_top;
  import dfm_pkg::*;
  logic        clk = 1'b0, rst;
  sample_t     adc, dac, pd, cosv, sinv;
  gain_t       gain;
  logic        sd, ss, sl;
  lf_t         d1, d2;
  ctrl_t       ctrl;
  logic [23:0] phase, fcw, ph_q;
  logic        hsync, ckout, hsout, up, dn, locked;
  logic [11:0] n_div;
  logic [6:0]  tdc_code;
  logic [18:0] dco_code, avg_code;
  logic [15:0] dco_in;
  int          checks = 0, failures = 0;

  localparam logic [23:0] CARRIER = 24'h10_0000;
  localparam int          GAIN    = 32;
  localparam int          DEV     = 16000;
  localparam int          PERIOD  = 240;

  // mechanism counters
  int m_load, m_free, m_track_pos, m_track_neg;
  int m_up, m_dn, m_lock, m_unlock, m_avg, m_dither;

  sdr_dpll_top dut (
    .clk(clk), .rst(rst),
    .adc_in(adc), .gain(gain), .ser_data(sd), .ser_shift(ss), .ser_load(sl),
    .dac_out(dac), .pd_err(pd), .lf_d1(d1), .lf_d2(d2), .dfg_ctrl(ctrl),
    .dfg_cos(cosv), .dfg_sin(sinv), .dfg_fcw(fcw), .dfg_phase(phase),
    .hsync(hsync), .n_div(n_div), .ckout(ckout), .hsout(hsout), .up(up), .dn(dn),
    .tdc_code(tdc_code), .dco_code(dco_code), .avg_dco_code(avg_code),
    .dco_in(dco_in), .locked(locked));

  always #5 clk = ~clk;

  initial begin
    #200000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // ---------------- FM source ----------------
  real  in_phase, pi;
  int   dev;
  logic src_on;
  always @(posedge clk) begin
    if (src_on) begin
      in_phase = in_phase + (real'(CARRIER) + real'(dev)) / 16777216.0;
      if (in_phase >= 1.0) in_phase = in_phase - 1.0;
      adc <= sample_t'($rtoi(127.0 * $sin(2.0 * pi * in_phase) + 1000.5) - 1000);
    end else begin
      adc <= '0;
    end
  end

  // ---------------- HSYNC source and PLL monitors ----------------
  int   t, edges;
  logic up_q, dn_q, lk_q, ck_q;
  logic [18:0] code_q;
  logic [15:0] in_q;
  always @(posedge clk) begin
    if (rst) t <= 0;
    else     t <= (t == PERIOD - 1) ? 0 : t + 1;
  end
  assign hsync = (t < 20);

  always @(posedge clk) begin
    if (!rst) begin
      if (up && !up_q) m_up++;
      if (dn && !dn_q) m_dn++;
      if (locked && !lk_q) m_lock++;
      if (!locked && lk_q) m_unlock++;
      if (locked && dut.u_pll.u_ctrl.tdc_valid) m_avg++;
      if (dco_code == code_q && dco_in != in_q) m_dither++;
      if (ckout && !ck_q) edges++;
    end
    up_q <= up; dn_q <= dn; lk_q <= locked; ck_q <= ckout;
    code_q <= dco_code; in_q <= dco_in;
  end

  // ---------------- FM demodulator sequence ----------------
  real mean_d1, mean_dac;
  task automatic measure(int clocks);
    mean_d1 = 0.0;
    mean_dac = 0.0;
    repeat (clocks) begin
      @(posedge clk);
      mean_d1 += real'(d1);
      mean_dac += real'(dac);
    end
    mean_d1 /= clocks;
    mean_dac /= clocks;
  endtask

  task automatic fm_step(int dv);
    real want = real'(dv) / GAIN;
    dev = dv;
    repeat (2000) @(posedge clk);
    measure(1024);
    check(mean_d1 > want - 0.05 * DEV / GAIN - 4 && mean_d1 < want + 0.05 * DEV / GAIN + 4,
          $sformatf("FM dev %0d: mean d1 %f want %f", dv, mean_d1, want));
    check(mean_dac > want / 16 - 3 && mean_dac < want / 16 + 3,
          $sformatf("FM dev %0d: mean dac %f want %f", dv, mean_dac, want / 16));
    if (dv > 0 && mean_d1 > want * 0.95) m_track_pos++;
    if (dv < 0 && mean_d1 < want * 0.95) m_track_neg++;
    $display("FM dev %0d: mean d1 %f, mean dac %f", dv, mean_d1, mean_dac);
  endtask

  task automatic fm_sequence();
    for (int b = 23; b >= 0; b--) begin
      sd = CARRIER[b]; ss = 1'b1;
      @(posedge clk);
      #1;
    end
    ss = 1'b0; sl = 1'b1;
    @(posedge clk);
    #1;
    sl = 1'b0;
    check(fcw == CARRIER, "carrier word loaded");
    if (fcw == CARRIER) m_load++;
    repeat (20) @(posedge clk);
    #1;
    for (int i = 0; i < 200; i++) begin
      ph_q = phase;
      @(posedge clk);
      #1;
      check(ctrl == 0 && phase == ph_q + CARRIER, "free running with no input");
      if (ctrl == 0 && phase == ph_q + CARRIER) m_free++;
    end
    src_on = 1'b1;
    fm_step(0);
    fm_step(DEV);
    fm_step(-DEV);
    fm_step(0);
  endtask

  // ---------------- pixel-clock DPLL sequence ----------------
  task automatic pll_ratio(int n);
    int waited = 0;
    n_div = 12'(n);
    repeat (4 * PERIOD) @(posedge clk);
    while (!locked && waited < 2000) begin
      repeat (PERIOD) @(posedge clk);
      waited++;
    end
    check(locked, $sformatf("PLL lock at N=%0d", n));
    repeat (8 * PERIOD) @(posedge clk);
    edges = 0;
    repeat (16 * PERIOD) @(posedge clk);
    check(edges >= 16 * n - 2 && edges <= 16 * n + 2,
          $sformatf("N=%0d: %0d CKOUT edges in 16 HSYNC periods", n, edges));
    $display("PLL N=%0d: locked after %0d periods, %0d CKOUT edges in 16 periods", n, waited + 4, edges);
  endtask

  initial begin
    pi = 3.14159265358979323846;
    in_phase = 0.0;
    dev = 0;
    src_on = 1'b0;
    {m_load, m_free, m_track_pos, m_track_neg} = '0;
    {m_up, m_dn, m_lock, m_unlock, m_avg, m_dither} = '0;
    rst = 1'b1;
    gain = 6'(GAIN);
    sd = 0; ss = 0; sl = 0;
    n_div = 12'd16;
    repeat (3) @(posedge clk);
    #1;
    rst = 1'b0;
    fork
      fm_sequence();
      begin
        pll_ratio(16);
        pll_ratio(12);
      end
    join
    $display("mechanisms: load %0d free %0d track+ %0d track- %0d up %0d dn %0d lock %0d unlock %0d avg %0d dither %0d",
             m_load, m_free, m_track_pos, m_track_neg, m_up, m_dn, m_lock, m_unlock, m_avg, m_dither);
    check(m_load > 0, "serial frequency word load happened");
    check(m_free > 0, "free running happened");
    check(m_track_pos > 0, "positive frequency tracking happened");
    check(m_track_neg > 0, "negative frequency tracking happened");
    check(m_up > 0, "UP pulse happened");
    check(m_dn > 0, "DN pulse happened");
    check(m_lock >= 2, "lock entry happened twice");
    check(m_unlock > 0, "lock loss happened");
    check(m_avg > 0, "averaged-code control happened");
    check(m_dither > 0, "delta-sigma dithering happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
