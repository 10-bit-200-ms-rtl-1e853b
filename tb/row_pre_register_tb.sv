// row_pre_register_tb: checks that the seven row_pre DFFs reset to 0 and hold,
// during each cycle, the row data present at the previous rising edge.
module row_pre_register_tb;
  logic       clk = 1'b0, rst_n = 1'b1;
  logic [6:0] row = '1, row_pre;
  int checks = 0, failures = 0;

  row_pre_register dut (.clk(clk), .rst_n(rst_n), .row(row), .row_pre(row_pre));

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
    logic [6:0] last;
    #1ns;
    checks++; if (row_pre !== 7'd0) begin failures++; $display("FAIL reset"); end
    @(negedge clk); rst_n = 1'b1;
    last = row;
    for (int n = 0; n < 300; n++) begin
      @(posedge clk); #1ns;
      checks++;
      if (row_pre !== last) begin failures++; $display("FAIL row_pre=%b exp=%b", row_pre, last); end
      row = 7'($urandom);
      last = row;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
