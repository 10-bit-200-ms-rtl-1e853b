// clock_gating_row_decoder: the proposed current-cell clock-gating row decoder.
//
// A conventional thermal decoder turns the registered UMSBs into row<1:8>
// (row<8> = 0). Seven DFFs keep the previous row data row_pre<1:7>, and the
// row clock-gating circuit enables clock<i> only for rows whose cells can
// change. Structure as in the document. The cells of row i see a rising edge of
// row_clk[i-1] at the next clock edge only if clock_enable[i-1] is 1 during
// the current cycle; row data reaches the cells on the same edge.
// An assertion checks, once per cycle on the falling edge, that the row data
// is a thermometer code (row<k> set implies row<k-1> set), which the enable
// rule relies on.
module clock_gating_row_decoder
  import dac_pkg::*;
#(
  parameter int unsigned IN_BITS = UMSB_BITS
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [IN_BITS-1:0]      umsb,
  output logic [(1<<IN_BITS)-1:0] row,           // row<1:8> to the cells
  output logic [(1<<IN_BITS)-1:0] clock_enable,  // clock_enable<1:8>
  output logic [(1<<IN_BITS)-1:0] row_clk        // clock<1:8> to the cells
);

  localparam int unsigned NR = 1 << IN_BITS;

  logic [NR-2:0] row_pre;

  row_thermal_decoder #(.IN_BITS(IN_BITS)) u_therm (
    .umsb(umsb),
    .row (row)
  );

  row_pre_register #(.N_ROWS_P(NR)) u_pre (
    .clk    (clk),
    .rst_n  (rst_n),
    .row    (row[NR-2:0]),
    .row_pre(row_pre)
  );

  row_clock_gating_circuit #(.N_ROWS_P(NR)) u_gate (
    .clk         (clk),
    .rst_n       (rst_n),
    .row         (row[NR-2:0]),
    .row_pre     (row_pre),
    .clock_enable(clock_enable),
    .row_clk     (row_clk)
  );

  // row<k> may only be set when row<k-1> is set
  a_row_thermometer: assert property (
    @(negedge clk) disable iff (!rst_n) ((row >> 1) & ~row) == '0
  ) else $error("row data is not a thermometer code: %b", row);

endmodule
