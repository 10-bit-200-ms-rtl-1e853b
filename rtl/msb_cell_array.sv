// msb_cell_array: the 256-position unary current-cell array.
//
// Four symmetric subcell arrays of 63 cells share the same row data, column
// lines and gated row clocks, so each MSB step of 16 LSB switches one cell of
// weight 4 LSB in every subcell array; the mirror symmetry is a matter of
// placement only and does not change the logic. The three ULSB cells (weight
// 4 LSB each) take the free row-8/column-8 position of subcell arrays 0..2 and
// are clocked every cycle by the ungated sampling clock; the fourth free
// position stays empty. 4 x 63 + 3 = 255 unary cells, as in the document; the
// ULSB cells' placement is this design's reading of its floorplan.
module msb_cell_array
  import dac_pkg::*;
#(
  parameter int unsigned N_SUB_P = N_SUB
) (
  input  logic                          clk,       // ungated sampling clock
  input  logic                          rst_n,
  input  logic [N_ROWS-1:0]             row,       // row<1:8>
  input  logic [N_COLS-1:0]             col,       // col<1:8>
  input  logic [N_ROWS-1:0]             row_clk,   // gated clock<1:8>
  input  logic [N_ULSB_CELLS-1:0]       ulsb_therm,
  output logic [N_SUB_P-1:0][N_ROWS*N_COLS-2:0] msb_q,   // per subcell array
  output logic [N_ULSB_CELLS-1:0]       ulsb_q
);

  for (genvar s = 0; s < N_SUB_P; s++) begin : g_sub
    subcell_array u_sub (
      .rst_n  (rst_n),
      .row    (row),
      .col    (col),
      .row_clk(row_clk),
      .q      (msb_q[s])
    );
  end

  // ULSB cells: a unary cell with row<i-1> = 1 and no column line loads its
  // thermometer bit directly.
  for (genvar k = 0; k < N_ULSB_CELLS; k++) begin : g_ulsb
    logic qb_unused;
    current_cell u_cell (
      .clk     (clk),
      .rst_n   (rst_n),
      .row_cur (ulsb_therm[k]),
      .row_prev(1'b1),
      .col     (1'b0),
      .q       (ulsb_q[k]),
      .qb      (qb_unused)
    );
  end

endmodule
