// cs_dac_top_tb: end-to-end test of the clock-gated 10-bit DAC at its only
// (full) size.
//
// A new code is applied every cycle: random codes, slow and fast ramps, small
// steps around a row boundary, a full-scale sine and the two extreme codes,
// with one reset in the middle. For every cycle the testbench checks, against
// values computed from the code alone:
//   * latency: the cells show the code applied two rising edges earlier;
//   * all four subcell arrays show the first (code >> 4) cells on, the ULSB
//     cells the thermometer of code[3:2], the LSB cells code[1:0];
//   * the modelled output current is code * 3.33 mA / 1023;
//   * the row clock enables equal the rows whose cells can change.
// It counts each mechanism of the design and fails if one never occurred:
// rows whose clock is withheld, cycles with only the partial row clocked,
// cycles with three or more rows clocked, a row filling, a row emptying, and
// the extreme codes 0 and 1023. It prints the ratio of row clock pulses to
// those an always-clocked array would receive.
module cs_dac_top_tb;
  import dac_tb_pkg::*;

  logic             clk = 1'b0, rst_n = 1'b1;
  logic [9:0]       din = '0;
  logic [7:0]       row_clk_en;
  logic [3:0][62:0] msb_q;
  logic [2:0]       ulsb_q;
  logic [1:0]       lsb_q;
  real              iout_ma, ioutb_ma;
  int checks = 0, failures = 0;

  cs_dac_top dut (.clk(clk), .rst_n(rst_n), .din(din), .row_clk_en(row_clk_en),
                  .msb_q(msb_q), .ulsb_q(ulsb_q), .lsb_q(lsb_q),
                  .iout_ma(iout_ma), .ioutb_ma(ioutb_ma));

  always #2.5ns clk = ~clk;   // 200 MS/s

  localparam int NCYC = 6000;

  // assert reset with a real falling edge shortly after time 0
  initial #0.2ns rst_n = 1'b0;

  initial begin : watchdog
    repeat (NCYC + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Stimulus for cycle n.
  function automatic int stim(int n, int last);
    int ph, v;
    ph = n / 500;
    case (ph % 6)
      0: v = int'($urandom_range(1023));
      1: v = (n % 500) * 2;                        // slow ramp
      2: v = (n % 2 == 0) ? 0 : 1023;              // extremes, every row switches
      3: v = 512 + int'($urandom_range(40)) - 20;  // around the row 4/5 boundary
      4: v = int'($floor(511.5 + 511.5 * $sin(2.0 * 3.14159265358979 * real'(n) / 20.0) + 0.5));
      default: v = last + int'($urandom_range(64)) - 32;
    endcase
    if (v < 0) v = 0;
    if (v > 1023) v = 1023;
    return v;
  endfunction

  int cnt_gated = 0, cnt_partial_only = 0, cnt_multi = 0, cnt_fill = 0, cnt_empty = 0;
  int cnt_zero = 0, cnt_full = 0, cnt_reset = 0, row_pulses = 0, row_cycles = 0;

  initial begin
    int code_hist [$];
    int c, cq1, cq2, last, en_cnt;
    logic [7:0] en_exp;
    real iexp, d;
    last = 0;
    // code_hist holds the code registered at each edge: [0] newest
    code_hist = '{0, 0};
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1'b1;
    for (int n = 0; n < NCYC; n++) begin
      if (n == NCYC / 2) begin
        // reset in the middle: everything returns to code 0
        @(negedge clk); rst_n = 1'b0; din = '0; #1ns; rst_n = 1'b1;
        cnt_reset++;
        checks++;
        if (msb_q !== '0 || ulsb_q !== '0 || lsb_q !== '0) begin failures++; $display("FAIL reset"); end
        code_hist = '{0, 0};
        last = 0;
      end
      c = stim(n, last);
      last = c;
      @(negedge clk);
      din = 10'(c);
      @(posedge clk); #0.5ns;
      code_hist.push_front(c);
      void'(code_hist.pop_back());
      cq1 = code_hist[0];   // in the input register now
      cq2 = code_hist[1];   // in the cells now
      // cell states = code registered one edge earlier (two edges after din)
      for (int s = 0; s < 4; s++) begin
        checks++;
        if (msb_q[s] !== subcell_pattern(cq2 >> 4)) begin
          failures++; $display("FAIL n=%0d sub %0d code=%0d", n, s, cq2);
        end
      end
      checks += 3;
      if (ulsb_q !== 3'((1 << ((cq2 >> 2) & 3)) - 1)) begin failures++; $display("FAIL n=%0d ulsb", n); end
      if (lsb_q !== 2'(cq2 & 3)) begin failures++; $display("FAIL n=%0d lsb", n); end
      iexp = real'(cq2) * 3.33 / 1023.0;
      d = iout_ma - iexp;
      if (d > 1e-9 || d < -1e-9) begin failures++; $display("FAIL n=%0d iout=%f exp=%f", n, iout_ma, iexp); end
      // enables for the next edge: register content cq1 against cell content cq2
      for (int i = 1; i <= 8; i++) en_exp[i-1] = row_needs_clock(cq2 >> 4, cq1 >> 4, i);
      checks++;
      if (row_clk_en !== en_exp) begin
        failures++; $display("FAIL n=%0d en=%b exp=%b (%0d->%0d)", n, row_clk_en, en_exp, cq2, cq1);
      end
      en_cnt = $countones(row_clk_en);
      row_pulses += en_cnt;
      row_cycles += 8;
      cnt_gated  += 8 - en_cnt;
      if (en_cnt == 1) cnt_partial_only++;
      if (en_cnt >= 3) cnt_multi++;
      if ((cq1 >> 7) > (cq2 >> 7)) cnt_fill++;
      if ((cq1 >> 7) < (cq2 >> 7)) cnt_empty++;
      if (cq2 == 0) cnt_zero++;
      if (cq2 == 1023) cnt_full++;
    end
    $display("INFO gated=%0d partial_only=%0d multi=%0d fill=%0d empty=%0d zero=%0d full=%0d reset=%0d",
             cnt_gated, cnt_partial_only, cnt_multi, cnt_fill, cnt_empty, cnt_zero, cnt_full, cnt_reset);
    $display("INFO row clock pulses %0d of %0d (%0.1f%% of an always-clocked array)",
             row_pulses, row_cycles, 100.0 * real'(row_pulses) / real'(row_cycles));
    foreach (cnt_gated_arr[i]) begin
      checks++;
      if (cnt_gated_arr[i] == 0) begin failures++; $display("FAIL mechanism %0d never happened", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cnt_gated_arr [8];
  always_comb cnt_gated_arr = '{cnt_gated, cnt_partial_only, cnt_multi, cnt_fill,
                                cnt_empty, cnt_zero, cnt_full, cnt_reset};
endmodule
