// tb_dfg: loads a frequency word through the serial port, then checks that
// the phase latch advances by word + control every clock (with zero,
// positive and negative control), that the word only changes on ser_load,
// and that the cosine and sine outputs are the table values of the phase a
// clock earlier (cosine a quarter turn ahead).
module tb_dfg;
  import dfm_pkg::*;
  logic        clk = 1'b0, rst;
  logic        sd, ss, sl;
  ctrl_t       ctrl;
  logic [23:0] phase, fcw;
  sample_t     cos_o, sin_o;
  int          checks = 0, failures = 0;
  logic [23:0] word, prev_phase, exp_phase;

  dfg dut (.clk(clk), .rst(rst), .ser_data(sd), .ser_shift(ss), .ser_load(sl),
           .ctrl(ctrl), .phase(phase), .fcw(fcw), .cos_out(cos_o), .sin_out(sin_o));

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int tbl(logic [13:0] a);
    real v = 127.0 * $sin(2.0 * 3.14159265358979323846 * (real'(a) + 0.5) / 16384.0);
    return (v >= 0.0) ? $rtoi(v + 0.5) : -$rtoi(-v + 0.5);
  endfunction

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    rst = 1'b1; sd = 0; ss = 0; sl = 0; ctrl = '0;
    repeat (2) @(posedge clk);
    #1;
    rst = 1'b0;
    chk(fcw == 0, "word after reset");
    // serial load, MSB first
    word = 24'h05_4321;
    for (int b = 23; b >= 0; b--) begin
      sd = word[b]; ss = 1'b1;
      @(posedge clk);
      #1;
      chk(fcw == 0, "word held while shifting");
    end
    ss = 1'b0;
    sl = 1'b1;
    @(posedge clk);
    #1;
    sl = 1'b0;
    chk(fcw == word, "word after load");
    for (int i = 0; i < 3000; i++) begin
      if (i == 1000) ctrl = ctrl_t'(18'sd70000);
      if (i == 2000) ctrl = ctrl_t'(-18'sd100000);
      prev_phase = phase;
      exp_phase  = prev_phase + word + 24'(ctrl);
      @(posedge clk);
      #1;
      chk(phase == exp_phase, $sformatf("phase step %0d", i));
      chk(int'(sin_o) == tbl(prev_phase[23:10]), "sine value");
      chk(int'(cos_o) == tbl(prev_phase[23:10] + 14'd4096), "cosine value");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
