// row_clock_generator_tb: checks one row clock generator.
//
// For every legal (thermometer) combination of row<i-1>, row<i> and their
// previous values, the expected enable is worked out from the cells
// themselves: a cell of row i holds row<i-1> & (row<i> | col), and the row
// needs a clock edge if some old and new column value make the old and new cell
// data differ. The test also counts rising edges of the gated row clock: one
// per cycle when enabled, none otherwise, and checks the row clock is low
// while the sampling clock is low.
module row_clock_generator_tb;
  logic clk = 1'b0, rst_n = 1'b1;
  logic row_prev = 1'b1, row_pre_prev = 1'b1, row_cur = 1'b0, row_pre_cur = 1'b0;
  logic clock_enable, row_clk;
  int checks = 0, failures = 0;
  int gated_edges = 0;

  row_clock_generator dut (
    .clk(clk), .rst_n(rst_n), .row_prev(row_prev), .row_pre_prev(row_pre_prev),
    .row_cur(row_cur), .row_pre_cur(row_pre_cur), .clock_enable(clock_enable), .row_clk(row_clk)
  );

  always #2.5ns clk = ~clk;
  always @(posedge row_clk) gated_edges++;

  // assert reset with a real falling edge shortly after time 0
  initial #0.2ns rst_n = 1'b0;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Row state: 0 = empty (row<i-1>=0,row<i>=0), 1 = partial (1,0), 2 = full (1,1).
  function automatic logic needs_clock(int s_now, int s_pre);
    logic np, nc, pp, pc, dn, dp;
    np = (s_now >= 1); nc = (s_now == 2);
    pp = (s_pre >= 1); pc = (s_pre == 2);
    needs_clock = 1'b0;
    for (int cp = 0; cp < 2; cp++)
      for (int cn = 0; cn < 2; cn++) begin
        dp = pp & (pc | logic'(cp));
        dn = np & (nc | logic'(cn));
        if (dp != dn) needs_clock = 1'b1;
      end
  endfunction

  initial begin
    int e0;
    logic expv;
    repeat (2) @(posedge clk);
    #1ns; rst_n = 1'b1;
    for (int rep = 0; rep < 4; rep++)
      for (int sn = 0; sn < 3; sn++)
        for (int sp = 0; sp < 3; sp++) begin
          @(posedge clk); #0.5ns;
          row_prev = (sn >= 1); row_cur = (sn == 2);
          row_pre_prev = (sp >= 1); row_pre_cur = (sp == 2);
          #0.5ns;
          expv = needs_clock(sn, sp);
          checks++;
          if (clock_enable !== expv) begin
            failures++; $display("FAIL now=%0d pre=%0d en=%b exp=%b", sn, sp, clock_enable, expv);
          end
          @(negedge clk); #0.5ns;
          checks++; if (row_clk !== 1'b0) begin failures++; $display("FAIL row_clk high while clk low"); end
          e0 = gated_edges;
          @(posedge clk); #0.5ns;
          checks++;
          if ((gated_edges - e0) != int'(expv)) begin
            failures++; $display("FAIL gated edges=%0d exp=%0d", gated_edges - e0, expv);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
