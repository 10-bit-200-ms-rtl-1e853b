// current_cell: digital part of one unary current-source cell.
//
// Local decoding: the cell in row i, column j is on when row i is full, or when
// row i-1 is full and column line j is set:
//   data = row<i-1> & (row<i> | col<j>)
// (the same function the document's cell logic gives for thermometer row data,
// where row<i> implies row<i-1>). The data is stored on the rising edge of the
// cell's clock, which for an MSB cell is its gated row clock, and drives the
// complementary switch controls q / qb that steer the cell current to I_OUT or
// to the complementary output. The document stores the data in a clocked
// latch; an edge-triggered register with one update per clock cycle is this
// design's equivalent. Reset to "off" is this design's choice.
module current_cell (
  input  logic clk,        // row clock (gated) or sampling clock
  input  logic rst_n,
  input  logic row_cur,    // row<i>
  input  logic row_prev,   // row<i-1>
  input  logic col,        // col<j>
  output logic q,          // 1: current steered to I_OUT
  output logic qb          // complement, steers to the other output
);

  logic data;

  assign data = row_prev & (row_cur | col);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= 1'b0;
    else        q <= data;
  end

  assign qb = ~q;

endmodule
