// row_clock_gating_circuit_tb: drives the eight-row clock-gating circuit with
// thermometer row data for random and hand-picked UMSB sequences and checks
// every clock_enable bit against the cell-based reference, and that each row
// clock gives exactly one rising edge per enabled cycle and none otherwise.
// Includes the document's example: row_pre = rows 1-3 full, row = rows 1-5
// full must enable rows 4, 5 and 6 only.
module row_clock_gating_circuit_tb;
  import dac_tb_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b1;
  logic [6:0] row = '0, row_pre = '0;
  logic [7:0] clock_enable, row_clk;
  int checks = 0, failures = 0;
  int edges [8];

  row_clock_gating_circuit dut (
    .clk(clk), .rst_n(rst_n), .row(row), .row_pre(row_pre),
    .clock_enable(clock_enable), .row_clk(row_clk)
  );

  always #2.5ns clk = ~clk;
  for (genvar i = 0; i < 8; i++) begin : g_cnt
    always @(posedge row_clk[i]) edges[i]++;
  end

  // assert reset with a real falling edge shortly after time 0
  initial #0.2ns rst_n = 1'b0;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [6:0] therm(int u);
    logic [6:0] t;
    for (int k = 1; k <= 7; k++) t[k-1] = (u >= k);
    return t;
  endfunction

  task automatic step(int u_pre, int u_now);
    int e0 [8];
    logic [7:0] expv;
    @(posedge clk); #0.5ns;
    row_pre = therm(u_pre);
    row     = therm(u_now);
    #0.5ns;
    // UMSB u means MSB codes 8u..8u+7; code 8u gives the same row data.
    for (int i = 1; i <= 8; i++) expv[i-1] = row_needs_clock(8 * u_pre, 8 * u_now, i);
    checks++;
    if (clock_enable !== expv) begin
      failures++; $display("FAIL u_pre=%0d u_now=%0d en=%b exp=%b", u_pre, u_now, clock_enable, expv);
    end
    foreach (e0[i]) e0[i] = edges[i];
    @(posedge clk); #0.5ns;
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (edges[i] - e0[i] != int'(expv[i])) begin
        failures++; $display("FAIL row %0d edges=%0d exp=%0d", i + 1, edges[i] - e0[i], expv[i]);
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1ns; rst_n = 1'b1;
    step(3, 5);
    checks++;
    if (clock_enable !== 8'b0011_1000) begin failures++; $display("FAIL example en=%b", clock_enable); end
    for (int a = 0; a < 8; a++)
      for (int b = 0; b < 8; b++) step(a, b);
    for (int n = 0; n < 100; n++) step(int'($urandom_range(7)), int'($urandom_range(7)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
