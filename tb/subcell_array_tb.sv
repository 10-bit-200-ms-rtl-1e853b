// subcell_array_tb: checks an 8x8 subcell array of 63 cells.
//
// The testbench derives row<1:8> and col<1:8> from a random 6-bit MSB code and
// pulses only the row clocks that the reference says are needed. After each
// pulse the 63 switch states must equal the first c cells in row-major order.
// It also withholds the clock from one row that needs it and checks that this
// row keeps its old data while the others update.
module subcell_array_tb;
  import dac_tb_pkg::*;

  logic        rst_n = 1'b1;
  logic [7:0]  row = '0, col = '0, row_clk = '0;
  logic [62:0] q;
  int checks = 0, failures = 0;

  subcell_array dut (.rst_n(rst_n), .row(row), .col(col), .row_clk(row_clk), .q(q));

  // assert reset with a real falling edge shortly after time 0
  initial #0.2ns rst_n = 1'b0;

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic drive(int c);
    for (int i = 1; i <= 8; i++) row[i-1] = (c >= 8 * i);
    for (int j = 1; j <= 8; j++) col[j-1] = ((c % 8) >= j);
  endtask

  initial begin
    int c_pre, c;
    logic [7:0] en;
    logic [62:0] expv;
    #1ns;
    checks++; if (q !== '0) begin failures++; $display("FAIL reset"); end
    rst_n = 1'b1;
    c_pre = 0;
    for (int n = 0; n < 400; n++) begin
      c = (n % 5 == 0) ? int'($urandom_range(63)) : c_pre + int'($urandom_range(6)) - 3;
      if (c < 0) c = 0;
      if (c > 63) c = 63;
      drive(c);
      for (int i = 1; i <= 8; i++) en[i-1] = row_needs_clock(c_pre, c, i);
      #1ns row_clk = en; #1ns row_clk = '0; #1ns;
      expv = subcell_pattern(c);
      checks++;
      if (q !== expv) begin failures++; $display("FAIL c %0d->%0d q=%h exp=%h", c_pre, c, q, expv); end
      c_pre = c;
    end
    // withheld clock: go from 8 to 40 but do not clock row 3
    drive(8);  #1ns row_clk = '1; #1ns row_clk = '0; #1ns;
    drive(40); #1ns row_clk = 8'b1111_1011; #1ns row_clk = '0; #1ns;
    expv = subcell_pattern(40);
    expv[23:16] = '0;
    checks++;
    if (q !== expv) begin failures++; $display("FAIL withheld row q=%h exp=%h", q, expv); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
