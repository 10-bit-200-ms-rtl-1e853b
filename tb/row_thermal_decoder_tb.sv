// row_thermal_decoder_tb: exhaustive check of the row_thermal_decoder thermometer code. For every
// input value v the expected output has its v lowest bits set (output bit k-1
// is 1 for v >= k), computed here as (1 << v) - 1 and limited to 8 bits.
module row_thermal_decoder_tb;
  logic [3-1:0] umsb;
  logic [8-1:0] row;
  int checks = 0, failures = 0;

  row_thermal_decoder dut (.umsb(umsb), .row(row));

  initial begin : watchdog
    #10us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [8:0] expv;
    for (int v = 0; v < (1 << 3); v++) begin
      umsb = 3'(v);
      #1ns;
      expv = ((8+1)'(1) << v) - 1'b1;
      checks++;
      if (row !== expv[8-1:0]) begin
        failures++; $display("FAIL in=%0d out=%b exp=%b", v, row, expv[8-1:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
