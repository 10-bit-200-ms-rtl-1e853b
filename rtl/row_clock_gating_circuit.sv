// row_clock_gating_circuit: the 8-bit row clock-gating circuit.
//
// One row_clock_generator per row. Generator i compares row<i-1>, row_pre<i-1>,
// row<i> and row_pre<i>. At the ends of the array the missing neighbours are
// tied off as in the document: row<0> and row_pre<0> to 1 (the row "below" row
// 1 is always full) and row<8> and row_pre<8> to 0 (row 8 is never full).
// Inputs are row<1:7> and row_pre<1:7> (bit k-1 = row k); outputs are the eight
// enables and the eight gated row clocks (bit i-1 = row i).
module row_clock_gating_circuit
  import dac_pkg::*;
#(
  parameter int unsigned N_ROWS_P = N_ROWS
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N_ROWS_P-2:0] row,           // row<1:7>
  input  logic [N_ROWS_P-2:0] row_pre,       // row_pre<1:7>
  output logic [N_ROWS_P-1:0] clock_enable,  // clock_enable<1:8>
  output logic [N_ROWS_P-1:0] row_clk        // clock<1:8>
);

  // Extended vectors: index 0 is row<0> (tied to 1), index N_ROWS_P is row<8> (tied to 0).
  logic [N_ROWS_P:0] row_x, row_pre_x;
  assign row_x     = {1'b0, row,     1'b1};
  assign row_pre_x = {1'b0, row_pre, 1'b1};

  for (genvar i = 1; i <= N_ROWS_P; i++) begin : g_row
    row_clock_generator u_gen (
      .clk         (clk),
      .rst_n       (rst_n),
      .row_prev    (row_x[i-1]),
      .row_pre_prev(row_pre_x[i-1]),
      .row_cur     (row_x[i]),
      .row_pre_cur (row_pre_x[i]),
      .clock_enable(clock_enable[i-1]),
      .row_clk     (row_clk[i-1])
    );
  end

endmodule
