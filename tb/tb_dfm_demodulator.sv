// tb_dfm_demodulator: closed-loop test of the FM demodulator. The DFG's
// free-running word is loaded through the serial port as the carrier
// (2**20, i.e. 1/16 of the clock rate). The test first checks that with no
// input the control stays at zero and the DFG runs at the free-running
// frequency. It then feeds a frequency-modulated sine, generated here in
// floating point, with a message that steps between deviations of +DEV,
// -DEV and 0 (in units of the 24-bit phase word) and finally a sinusoidal
// message. For a locked loop the control word equals the deviation, so the
// loop filter output d1 must average DEV/gain and the DAC word about
// d1/16; the sinusoidal message must come out of the DAC with the right
// sign and amplitude.
module tb_dfm_demodulator;
  import dfm_pkg::*;
  logic        clk = 1'b0, rst;
  sample_t     adc, dac, pd, cosv, sinv;
  gain_t       gain;
  logic        sd, ss, sl;
  lf_t         d1, d2;
  ctrl_t       ctrl;
  logic [23:0] phase, fcw, ph_q;
  int          checks = 0, failures = 0;
  real         in_phase, pi;
  int          dev;
  real         sum_d1, sum_dac;
  int          n_sum;

  localparam logic [23:0] CARRIER = 24'h10_0000;
  localparam int          GAIN    = 32;
  localparam int          DEV     = 16000;

  dfm_demodulator dut (.clk(clk), .rst(rst), .adc_in(adc), .gain(gain),
    .ser_data(sd), .ser_shift(ss), .ser_load(sl), .dac_out(dac), .pd_err(pd),
    .lf_d1(d1), .lf_d2(d2), .dfg_ctrl(ctrl), .dfg_cos(cosv), .dfg_sin(sinv),
    .dfg_fcw(fcw), .dfg_phase(phase));

  always #5 clk = ~clk;

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // FM source: phase advances by (carrier + dev) / 2**24 turns per clock
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

  task automatic measure(int clocks);
    sum_d1 = 0.0;
    sum_dac = 0.0;
    n_sum = 0;
    repeat (clocks) begin
      @(posedge clk);
      sum_d1 += real'(d1);
      sum_dac += real'(dac);
      n_sum++;
    end
    sum_d1 = sum_d1 / n_sum;
    sum_dac = sum_dac / n_sum;
  endtask

  task automatic expect_dev(int dv);
    real want = real'(dv) / GAIN;
    dev = dv;
    repeat (2000) @(posedge clk);
    measure(1024);
    checks += 2;
    if (sum_d1 < want - 0.05 * DEV / GAIN - 4 || sum_d1 > want + 0.05 * DEV / GAIN + 4) begin
      failures++;
      $display("FAIL dev=%0d mean d1=%f want %f", dv, sum_d1, want);
    end
    if (sum_dac < want / 16 - 3 || sum_dac > want / 16 + 3) begin
      failures++;
      $display("FAIL dev=%0d mean dac=%f want %f", dv, sum_dac, want / 16);
    end
    $display("dev %0d: mean d1 %f (want %f) mean dac %f", dv, sum_d1, want, sum_dac);
  endtask

  real corr, pwr, msg;

  initial begin
    pi = 3.14159265358979323846;
    in_phase = 0.0;
    dev = 0;
    src_on = 1'b0;
    rst = 1'b1;
    gain = 6'(GAIN);
    sd = 0; ss = 0; sl = 0;
    repeat (3) @(posedge clk);
    #1;
    rst = 1'b0;
    for (int b = 23; b >= 0; b--) begin
      sd = CARRIER[b]; ss = 1'b1;
      @(posedge clk);
      #1;
    end
    ss = 1'b0; sl = 1'b1;
    @(posedge clk);
    #1;
    sl = 1'b0;
    checks++;
    if (fcw != CARRIER) begin failures++; $display("FAIL word not loaded"); end
    // no input: zero control, free-running frequency
    repeat (20) @(posedge clk);
    #1;
    for (int i = 0; i < 200; i++) begin
      ph_q = phase;
      @(posedge clk);
      #1;
      checks++;
      if (ctrl != 0 || phase != ph_q + CARRIER) begin
        failures++;
        $display("FAIL free running ctrl=%0d", ctrl);
      end
    end
    // FM input with step message
    src_on = 1'b1;
    expect_dev(0);
    expect_dev(DEV);
    expect_dev(-DEV);
    expect_dev(DEV / 2);
    expect_dev(0);
    // sinusoidal message, period 4096 clocks, correlate the DAC output
    corr = 0.0;
    pwr = 0.0;
    for (int i = 0; i < 4 * 4096; i++) begin
      msg = $sin(2.0 * pi * real'(i) / 4096.0);
      dev = $rtoi(real'(DEV) * msg);
      @(posedge clk);
      if (i >= 4096) begin
        corr += real'(dac) * msg;
        pwr += msg * msg;
      end
    end
    // amplitude of the recovered message: DEV / GAIN / 16 = 31.25 DAC steps
    corr = corr / pwr;
    checks++;
    if (corr < 0.8 * DEV / GAIN / 16 || corr > 1.1 * DEV / GAIN / 16) begin
      failures++;
      $display("FAIL message amplitude %f", corr);
    end
    $display("sinusoidal message amplitude in DAC steps: %f", corr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
