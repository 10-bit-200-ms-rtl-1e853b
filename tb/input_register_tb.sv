// input_register_tb: checks that the input register resets to 0, captures the
// 10-bit code on each rising edge (one cycle of latency) and splits it into
// the UMSB/LMSB/ULSB/LLSB fields at the right bit positions.
module input_register_tb;
  import dac_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b1;
  logic [9:0]  din = '0;
  dac_code_t   q;
  int checks = 0, failures = 0;

  input_register dut (.clk(clk), .rst_n(rst_n), .din(din), .q(q));

  always #2.5ns clk = ~clk;

  // assert reset with a real falling edge shortly after time 0
  initial #0.2ns rst_n = 1'b0;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [9:0] v;
    din = 10'h3ff;
    #1ns;
    checks++; if (q !== '0) begin failures++; $display("FAIL reset q=%h", q); end
    @(negedge clk); rst_n = 1'b1;
    for (int n = 0; n < 500; n++) begin
      v = 10'($urandom);
      din = v;
      @(posedge clk); #1ns;
      checks++;
      if (q.umsb != v[9:7] || q.lmsb != v[6:4] || q.ulsb != v[3:2] || q.llsb != v[1:0]) begin
        failures++; $display("FAIL din=%h q=%h", v, q);
      end
      din = ~v;   // a change between edges must not reach q
      #1ns;
      checks++; if (q != v) begin failures++; $display("FAIL q changed between edges"); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
