// clock_gating_row_decoder_tb: drives the proposed row decoder with UMSB
// sequences as the input register would (a new value just after each rising
// edge) and checks, every cycle, the decoded row data, the clock_enable bits
// against the cell-based reference for the previous and current value, and the
// number of rising edges on every row clock. It replays the document's two
// examples: MSB codes 28 -> 30 -> 33 enable row 4, then rows 4 and 5; MSB codes
// 28 -> 44 enable rows 4, 5 and 6.
module clock_gating_row_decoder_tb;
  import dac_tb_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b1;
  logic [2:0] umsb = '0;
  logic [7:0] row, clock_enable, row_clk;
  int checks = 0, failures = 0;
  int edges [8];
  int u_last = 0;

  clock_gating_row_decoder dut (
    .clk(clk), .rst_n(rst_n), .umsb(umsb), .row(row),
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

  // Apply MSB code c (its UMSB part) for one cycle and check; returns the enables.
  task automatic apply(int c, output logic [7:0] en_seen);
    int e0 [8];
    logic [7:0] expv, exp_row;
    int u;
    u = c / 8;
    @(posedge clk); #0.5ns;
    umsb = 3'(u);
    #0.5ns;
    for (int i = 1; i <= 8; i++) begin
      expv[i-1]    = row_needs_clock(8 * u_last, 8 * u, i);
      exp_row[i-1] = (u >= i);
    end
    checks += 2;
    if (row !== exp_row) begin failures++; $display("FAIL row=%b exp=%b", row, exp_row); end
    if (clock_enable !== expv) begin
      failures++; $display("FAIL u %0d->%0d en=%b exp=%b", u_last, u, clock_enable, expv);
    end
    en_seen = clock_enable;
    foreach (e0[i]) e0[i] = edges[i];
    @(posedge clk); #0.1ns;
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (edges[i] - e0[i] != int'(expv[i])) begin
        failures++; $display("FAIL row %0d edges=%0d exp=%0d", i + 1, edges[i] - e0[i], expv[i]);
      end
    end
    u_last = u;
    // The value stays applied for one more cycle (the next apply() waits for
    // the following edge), so each code is held two cycles; the first is checked.
  endtask

  initial begin
    logic [7:0] en;
    repeat (2) @(posedge clk);
    #1ns; rst_n = 1'b1;
    // Document example (row clocks during the row-by-row fill of its figure)
    apply(28, en); apply(28, en);
    apply(30, en);
    checks++; if (en !== 8'b0000_1000) begin failures++; $display("FAIL 28->30 en=%b", en); end
    apply(30, en);
    apply(33, en);
    checks++; if (en !== 8'b0001_1000) begin failures++; $display("FAIL 30->33 en=%b", en); end
    apply(28, en); apply(28, en);
    apply(44, en);
    checks++; if (en !== 8'b0011_1000) begin failures++; $display("FAIL 28->44 en=%b", en); end
    for (int n = 0; n < 300; n++) apply(int'($urandom_range(63)), en);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
