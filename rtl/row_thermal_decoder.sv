// row_thermal_decoder: the conventional thermal decoder of the row decoder.
//
// Turns the three UMSBs into the row data row<1:8>. Row k (1-based) is "full"
// (every cell of the row on) when the UMSB value is at least k, so row<1:7>
// form a thermometer code and row<8> is constant 0, as the document's row
// decoder shows. Output bit k-1 carries row<k>. Purely combinational.
module row_thermal_decoder
  import dac_pkg::*;
#(
  parameter int unsigned IN_BITS = UMSB_BITS
) (
  input  logic [IN_BITS-1:0]      umsb,
  output logic [(1<<IN_BITS)-1:0] row
);

  always_comb begin
    for (int k = 1; k <= (1 << IN_BITS); k++)
      row[k-1] = (int'(umsb) >= k);
  end

endmodule
