// column_decoder: thermometer decoder from the three LMSBs to the column lines.
//
// col<j> (1-based, output bit j-1) is 1 when the LMSB value is at least j. It
// selects how many cells of the partially filled row are on: with the row data
// from the row decoder, cell (i, j) of a subcell array is on when row i is full
// or row i-1 is full and col<j> is 1, so the MSB code c turns on the first c
// cells of the 8x8 array in row-major order. col<8> is therefore always 0.
// The document gives only the decoder's name and its 8 outputs; the
// thermometer coding is read from its cell-selection figure. Combinational.
module column_decoder
  import dac_pkg::*;
#(
  parameter int unsigned IN_BITS = LMSB_BITS
) (
  input  logic [IN_BITS-1:0]      lmsb,
  output logic [(1<<IN_BITS)-1:0] col
);

  always_comb begin
    for (int j = 1; j <= (1 << IN_BITS); j++)
      col[j-1] = (int'(lmsb) >= j);
  end

endmodule
