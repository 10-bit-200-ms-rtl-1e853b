// dac_current_output_model_tb: sets random cell switch states and checks the
// modelled output currents: I_OUT = k * 3.33 mA / 1023 with k the number of
// LSB units switched on (4 per unary cell, 1 and 2 for the binary cells, counted
// here cell by cell) and I_OUT + I_OUTB = 3.33 mA, including all-off and
// full scale (1023 units).
module dac_current_output_model_tb;
  logic [3:0][62:0] msb_q = '0;
  logic [2:0]       ulsb_q = '0;
  logic [1:0]       lsb_q = '0;
  real iout_ma, ioutb_ma;
  int checks = 0, failures = 0;

  dac_current_output_model dut (.msb_q(msb_q), .ulsb_q(ulsb_q), .lsb_q(lsb_q),
                                .iout_ma(iout_ma), .ioutb_ma(ioutb_ma));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k;
    real expv, d;
    for (int n = 0; n < 300; n++) begin
      for (int s = 0; s < 4; s++) msb_q[s] = {31'($urandom), 32'($urandom)};
      if (n == 0) msb_q = '0;
      if (n == 1) msb_q = '1;
      ulsb_q = (n == 1) ? 3'b111 : 3'($urandom);
      lsb_q  = (n == 1) ? 2'b11  : 2'($urandom);
      if (n == 0) begin ulsb_q = '0; lsb_q = '0; end
      k = 0;
      for (int s = 0; s < 4; s++)
        for (int c = 0; c < 63; c++) if (msb_q[s][c]) k += 4;
      for (int c = 0; c < 3; c++) if (ulsb_q[c]) k += 4;
      if (lsb_q[0]) k += 1;
      if (lsb_q[1]) k += 2;
      #1ns;
      expv = 3.33 * real'(k) / 1023.0;
      d = iout_ma - expv;
      checks++;
      if (d > 1e-9 || d < -1e-9) begin failures++; $display("FAIL k=%0d iout=%f exp=%f", k, iout_ma, expv); end
      d = iout_ma + ioutb_ma - 3.33;
      checks++;
      if (d > 1e-9 || d < -1e-9) begin failures++; $display("FAIL sum=%f", iout_ma + ioutb_ma); end
      if (n == 1) begin
        checks++; if (k != 1023) begin failures++; $display("FAIL full scale k=%0d", k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
