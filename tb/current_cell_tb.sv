// current_cell_tb: checks one current cell. For all eight combinations of
// row<i>, row<i-1> and col it checks that the stored switch state after a
// rising clock edge is on exactly when the cell's position is covered by the
// thermometer code (row i full, or row i-1 full and the column selected), that
// qb is its complement, that the state holds while the clock is stopped, and
// that reset turns the cell off.
module current_cell_tb;
  logic clk = 1'b0, rst_n = 1'b1;
  logic row_cur = 1'b1, row_prev = 1'b1, col = 1'b1, q, qb;
  int checks = 0, failures = 0;

  current_cell dut (.clk(clk), .rst_n(rst_n), .row_cur(row_cur), .row_prev(row_prev),
                    .col(col), .q(q), .qb(qb));

  // assert reset with a real falling edge shortly after time 0
  initial #0.2ns rst_n = 1'b0;

  initial begin : watchdog
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pulse();
    #2ns clk = 1'b1; #2ns clk = 1'b0; #1ns;
  endtask

  initial begin
    logic expv, held;
    #1ns;
    checks++; if (q !== 1'b0 || qb !== 1'b1) begin failures++; $display("FAIL reset"); end
    rst_n = 1'b1;
    for (int rep = 0; rep < 3; rep++)
      for (int v = 0; v < 8; v++) begin
        {row_prev, row_cur, col} = 3'(v);
        // position covered: the row is full, or it is the partial row and the column is selected
        expv = (row_prev && row_cur) || (row_prev && !row_cur && col);
        pulse();
        checks++;
        if (q !== expv || qb !== ~expv) begin
          failures++; $display("FAIL rp=%b r=%b c=%b q=%b exp=%b", row_prev, row_cur, col, q, expv);
        end
        // without a clock edge the cell must keep its state
        held = q;
        {row_prev, row_cur, col} = ~3'(v);
        #5ns;
        checks++; if (q !== held) begin failures++; $display("FAIL cell changed without clock"); end
      end
    rst_n = 1'b0; #1ns;
    checks++; if (q !== 1'b0) begin failures++; $display("FAIL async reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
