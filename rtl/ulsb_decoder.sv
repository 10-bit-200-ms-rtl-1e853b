// ulsb_decoder: thermometer decoder from the two ULSBs to the three unary
// ULSB current cells.
//
// Output bit k-1 is 1 when the ULSB value is at least k, so the value v turns
// on v cells of weight 4 LSB. The document names the decoder and its 3-line
// output; the thermometer coding is the usual one for unary cells. Combinational.
module ulsb_decoder
  import dac_pkg::*;
#(
  parameter int unsigned IN_BITS = ULSB_BITS
) (
  input  logic [IN_BITS-1:0]        ulsb,
  output logic [(1<<IN_BITS)-2:0]   therm
);

  always_comb begin
    for (int k = 1; k < (1 << IN_BITS); k++)
      therm[k-1] = (int'(ulsb) >= k);
  end

endmodule
