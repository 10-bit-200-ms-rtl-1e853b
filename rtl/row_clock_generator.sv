// row_clock_generator: clock enable and clock gate for one row of current cells.
//
// The cells of row i load row<i>, row<i-1> and a column line, so their data can
// only change when
//   * the row's own full/empty state changes   (row<i> != row_pre<i>), or
//   * the row is the partially filled row now  (row<i-1> & !row<i>), whose
//     cells follow the column lines, or
//   * the row was the partially filled row in the previous cycle
//     (row_pre<i-1> & !row_pre<i>).
// clock_enable<i> is the OR of these three terms; it reproduces the enable
// pattern of the document's worked example and uses exactly the four inputs the
// document's row clock generator has. The gated row clock is the sampling clock
// ANDed with the enable.
//
// Timing: row and row_pre change just after the rising clock edge, so the
// enable is computed during the clock-high phase and is sampled on the falling
// edge; the gated clock row_clk then follows clk during the next high phase only
// when the sampled enable is 1. Sampling on the falling edge (this design's
// choice) keeps the gated clock free of glitches; the document gates with the
// inverted clock but does not describe how glitches are avoided.
module row_clock_generator (
  input  logic clk,
  input  logic rst_n,
  input  logic row_prev,       // row<i-1>
  input  logic row_pre_prev,   // row_pre<i-1>
  input  logic row_cur,        // row<i>
  input  logic row_pre_cur,    // row_pre<i>
  output logic clock_enable,   // clock_enable<i>, combinational, for the next edge
  output logic row_clk         // clock<i>, gated clock of the row
);

  logic en_q;

  always_comb begin
    clock_enable = (row_cur ^ row_pre_cur)
                 | (row_prev & ~row_cur)
                 | (row_pre_prev & ~row_pre_cur);
  end

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) en_q <= 1'b0;
    else        en_q <= clock_enable;
  end

  assign row_clk = clk & en_q;

endmodule
