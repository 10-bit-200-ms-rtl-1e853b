// ulsb_decoder_tb: exhaustive check of the ulsb_decoder thermometer code. For every
// input value v the expected output has its v lowest bits set (output bit k-1
// is 1 for v >= k), computed here as (1 << v) - 1 and limited to 3 bits.
module ulsb_decoder_tb;
  logic [2-1:0] ulsb;
  logic [3-1:0] therm;
  int checks = 0, failures = 0;

  ulsb_decoder dut (.ulsb(ulsb), .therm(therm));

  initial begin : watchdog
    #10us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] expv;
    for (int v = 0; v < (1 << 2); v++) begin
      ulsb = 2'(v);
      #1ns;
      expv = ((3+1)'(1) << v) - 1'b1;
      checks++;
      if (therm !== expv[3-1:0]) begin
        failures++; $display("FAIL in=%0d out=%b exp=%b", v, therm, expv[3-1:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
