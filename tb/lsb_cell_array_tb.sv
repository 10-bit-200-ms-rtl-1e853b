// lsb_cell_array_tb: checks the two binary LLSB cells: reset to off, load the
// two LSBs on each rising clock edge (bit b -> cell of weight 2^b) and hold
// them between edges.
module lsb_cell_array_tb;
  logic       clk = 1'b0, rst_n = 1'b1;
  logic [1:0] llsb = 2'b11, q;
  int checks = 0, failures = 0;

  lsb_cell_array dut (.clk(clk), .rst_n(rst_n), .llsb(llsb), .q(q));

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
    logic [1:0] v;
    #1ns;
    checks++; if (q !== 2'b00) begin failures++; $display("FAIL reset"); end
    @(negedge clk); rst_n = 1'b1;
    for (int n = 0; n < 200; n++) begin
      v = 2'($urandom);
      llsb = v;
      @(posedge clk); #0.5ns;
      checks++; if (q !== v) begin failures++; $display("FAIL q=%b exp=%b", q, v); end
      llsb = ~v; #1ns;
      checks++; if (q !== v) begin failures++; $display("FAIL changed between edges"); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
