// row_pre_register: the seven DFFs of the clock-gating row decoder.
//
// On every rising edge of the (ungated) sampling clock they store the current
// row data row<1:7>, so during the following cycle row_pre<1:7> is the row data
// that the current cells were last loaded with. Row<8> is constant 0 and needs
// no flip-flop. The seven DFFs are the document's; the asynchronous reset to 0
// (matching an all-off cell array after reset) is this design's choice.
module row_pre_register
  import dac_pkg::*;
#(
  parameter int unsigned N_ROWS_P = N_ROWS
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N_ROWS_P-2:0] row,      // row<1:7>
  output logic [N_ROWS_P-2:0] row_pre   // row_pre<1:7>
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) row_pre <= '0;
    else        row_pre <= row;
  end

endmodule
