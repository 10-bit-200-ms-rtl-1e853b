// subcell_array: one 8x8 subcell array of MSB current cells.
//
// Holds 63 current cells: every position except row 8 / column 8, which is
// never turned on by the 6-bit MSB code and is left for a ULSB cell (placed by
// msb_cell_array). Cell (i, j) sits in row i (1..8) and column j (1..8) and is
// clocked by its row's clock row_clk[i-1], so only rows whose clock was enabled
// load new data. row[i-1] is row<i>, col[j-1] is col<j>; row<0> is constant 1.
// Output q[(i-1)*8 + (j-1)] is the switch state of cell (i, j); with MSB code c
// the first c cells in row-major order are on. The 8x8 size and the 63 cells
// follow the document; the row-major numbering is the one its figures use.
module subcell_array
  import dac_pkg::*;
#(
  parameter int unsigned N_ROWS_P = N_ROWS,
  parameter int unsigned N_COLS_P = N_COLS
) (
  input  logic                           rst_n,
  input  logic [N_ROWS_P-1:0]            row,      // row<1:8>
  input  logic [N_COLS_P-1:0]            col,      // col<1:8>
  input  logic [N_ROWS_P-1:0]            row_clk,  // clock<1:8>
  output logic [N_ROWS_P*N_COLS_P-2:0]   q         // 63 cell switch states
);

  logic [N_ROWS_P:0] row_x;   // index 0: row<0> = 1
  assign row_x = {row, 1'b1};

  for (genvar i = 1; i <= N_ROWS_P; i++) begin : g_r
    for (genvar j = 1; j <= N_COLS_P; j++) begin : g_c
      if (!(i == N_ROWS_P && j == N_COLS_P)) begin : g_cell
        logic qb_unused;
        current_cell u_cell (
          .clk     (row_clk[i-1]),
          .rst_n   (rst_n),
          .row_cur (row_x[i]),
          .row_prev(row_x[i-1]),
          .col     (col[j-1]),
          .q       (q[(i-1)*N_COLS_P + (j-1)]),
          .qb      (qb_unused)
        );
      end
    end
  end

endmodule
