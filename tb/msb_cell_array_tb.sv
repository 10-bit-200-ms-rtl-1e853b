// msb_cell_array_tb: checks the 255-cell unary array. Row data, column lines
// and ULSB thermometer bits are derived from random codes in the testbench;
// only the needed row clocks pulse (together with the sampling clock). After
// every edge all four subcell arrays must show the first c cells on (c = MSB
// code), the ULSB cells must show the ULSB thermometer code, and the total
// number of unary cells on must be 4*c + ULSB.
module msb_cell_array_tb;
  import dac_tb_pkg::*;

  logic             clk = 1'b0, rst_n = 1'b1;
  logic [7:0]       row = '0, col = '0, row_en = '0, row_clk;
  logic [2:0]       ulsb_therm = '0;
  logic [3:0][62:0] msb_q;
  logic [2:0]       ulsb_q;
  int checks = 0, failures = 0;

  assign row_clk = {8{clk}} & row_en;

  msb_cell_array dut (.clk(clk), .rst_n(rst_n), .row(row), .col(col), .row_clk(row_clk),
                      .ulsb_therm(ulsb_therm), .msb_q(msb_q), .ulsb_q(ulsb_q));

  // assert reset with a real falling edge shortly after time 0
  initial #0.2ns rst_n = 1'b0;

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c_pre, c, u, ones;
    #1ns;
    checks++; if (msb_q !== '0 || ulsb_q !== '0) begin failures++; $display("FAIL reset"); end
    rst_n = 1'b1;
    c_pre = 0;
    for (int n = 0; n < 400; n++) begin
      c = int'($urandom_range(63));
      u = int'($urandom_range(3));
      for (int i = 1; i <= 8; i++) row[i-1] = (c >= 8 * i);
      for (int j = 1; j <= 8; j++) col[j-1] = ((c % 8) >= j);
      for (int k = 1; k <= 3; k++) ulsb_therm[k-1] = (u >= k);
      for (int i = 1; i <= 8; i++) row_en[i-1] = row_needs_clock(c_pre, c, i);
      #1ns clk = 1'b1; #2ns clk = 1'b0; #1ns;
      ones = $countones(msb_q) + $countones(ulsb_q);
      for (int s = 0; s < 4; s++) begin
        checks++;
        if (msb_q[s] !== subcell_pattern(c)) begin failures++; $display("FAIL sub %0d c=%0d", s, c); end
      end
      checks += 2;
      if (ulsb_q !== 3'((1 << u) - 1)) begin failures++; $display("FAIL ulsb=%b u=%0d", ulsb_q, u); end
      if (ones != 4 * c + u) begin failures++; $display("FAIL unary count %0d exp %0d", ones, 4 * c + u); end
      c_pre = c;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
