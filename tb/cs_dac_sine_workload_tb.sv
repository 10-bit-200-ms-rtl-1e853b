// cs_dac_sine_workload_tb: sine-wave workloads at 200 MS/s.
//
// Feeds the full DAC with sampled sine waves, code = round(511.5 + 511.5*A*
// sin(2*pi*f*n/200 MHz + 0.1)), for the signal frequencies (1.25 to 20 MHz)
// and normalised amplitudes (1 to 1/16) of the published clock-gating study,
// and measures the average number of clock-enabled rows out of eight. Each
// measured average must lie within 0.15 rows of the published value. Every
// cycle the output current is also checked against the code applied two
// edges earlier.
module cs_dac_sine_workload_tb;
  logic             clk = 1'b0, rst_n = 1'b1;
  logic [9:0]       din = '0;
  logic [7:0]       row_clk_en;
  logic [3:0][62:0] msb_q;
  logic [2:0]       ulsb_q;
  logic [1:0]       lsb_q;
  real              iout_ma, ioutb_ma;
  int checks = 0, failures = 0;

  cs_dac_top dut (.clk(clk), .rst_n(rst_n), .din(din), .row_clk_en(row_clk_en),
                  .msb_q(msb_q), .ulsb_q(ulsb_q), .lsb_q(lsb_q),
                  .iout_ma(iout_ma), .ioutb_ma(ioutb_ma));

  always #2.5ns clk = ~clk;

  // assert reset with a real falling edge shortly after time 0
  initial #0.2ns rst_n = 1'b0;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { real f_mhz; real amp; real rows; } wl_t;
  localparam int NWL = 14;
  // published average clock-enabled rows (of 8)
  wl_t wl [NWL] = '{
    '{20.0, 1.0, 2.4}, '{10.0, 1.0, 1.8}, '{5.0, 1.0, 1.4}, '{2.5, 1.0, 1.2}, '{1.25, 1.0, 1.1},
    '{20.0, 0.25, 1.2}, '{10.0, 0.25, 1.2}, '{5.0, 0.25, 1.1}, '{2.5, 0.25, 1.05}, '{1.25, 0.25, 1.025},
    '{20.0, 0.5, 1.6}, '{20.0, 0.0625, 1.2},
    '{2.5, 0.5, 1.1}, '{2.5, 0.0625, 1.025}
  };

  initial begin
    int c, nsamp, en_sum, h0, h1;
    real avg, iexp, d;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1'b1;
    for (int w = 0; w < NWL; w++) begin
      nsamp = int'(8.0 * 200.0 / wl[w].f_mhz);   // eight signal periods
      en_sum = 0;
      h0 = int'(din); h1 = int'(din);
      for (int n = 0; n < nsamp + 2; n++) begin
        c = int'($floor(511.5 + 511.5 * wl[w].amp *
                        $sin(2.0 * 3.14159265358979 * wl[w].f_mhz * real'(n) / 200.0 + 0.1) + 0.5));
        @(negedge clk);
        din = 10'(c);
        @(posedge clk); #0.5ns;
        h1 = h0; h0 = c;
        iexp = real'(h1) * 3.33 / 1023.0;
        d = iout_ma - iexp;
        checks++;
        if (d > 1e-9 || d < -1e-9) begin failures++; $display("FAIL iout=%f exp=%f", iout_ma, iexp); end
        // the first two enables still compare against the previous workload
        if (n >= 2) en_sum += $countones(row_clk_en);
      end
      avg = real'(en_sum) / real'(nsamp);
      $display("INFO f=%0.2f MHz A=%0.4f avg enabled rows %0.3f (%0.1f%%), published %0.3f",
               wl[w].f_mhz, wl[w].amp, avg, 100.0 * avg / 8.0, wl[w].rows);
      checks++;
      if (avg - wl[w].rows > 0.15 || wl[w].rows - avg > 0.15) begin
        failures++; $display("FAIL workload %0d average rows off", w);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
