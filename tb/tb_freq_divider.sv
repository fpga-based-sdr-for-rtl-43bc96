// tb_freq_divider: random CKOUT edge strobes; for several N the distance
// between HSOUT rising edges must be exactly N strobes and HSOUT must be
// high for ceil(N/2) of them.
module tb_freq_divider;
  logic        clk = 1'b0, rst, ck_rise, hsout, hs_q;
  logic [11:0] n;
  int          checks = 0, failures = 0;
  int          since, high, nrise;
  int          ns [6] = '{2, 3, 16, 17, 800, 4095};

  freq_divider dut (.clk(clk), .rst(rst), .ck_rise(ck_rise), .n_div(n), .hsout(hsout));

  always #5 clk = ~clk;

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (ns[i]) begin
      rst = 1'b1;
      n = 12'(ns[i]);
      ck_rise = 1'b0;
      @(posedge clk);
      #1;
      rst = 1'b0;
      hs_q = 1'b0;
      since = 0;
      high = 0;
      nrise = 0;
      while (nrise < 6) begin
        ck_rise = 1'($urandom_range(0, 2) == 0);
        @(posedge clk);
        #1;
        if (ck_rise) begin
          if (hsout && !hs_q) begin
            if (nrise > 0) begin
              checks += 2;
              if (since != ns[i]) begin
                failures++;
                $display("FAIL N=%0d period %0d", ns[i], since);
              end
              if (high != (ns[i] + 1) / 2) begin
                failures++;
                $display("FAIL N=%0d high %0d", ns[i], high);
              end
            end
            nrise++;
            since = 0;
            high = 0;
          end
          since++;
          if (hsout) high++;
        end
        hs_q = hsout;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
