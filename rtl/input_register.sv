// input_register: the DAC's input registers.
//
// Captures the 10-bit input code on every rising edge of the sampling clock and
// presents it split into the UMSB/LMSB/ULSB/LLSB fields that feed the row,
// column and ULSB decoders and the binary LSB cells. One cycle of latency.
// The register itself is shown in the document's block diagram; the
// asynchronous active-low reset to code 0 is this design's choice.
module input_register
  import dac_pkg::*;
#(
  parameter int unsigned N_BITS_P = N_BITS
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N_BITS_P-1:0] din,
  output dac_code_t           q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= dac_code_t'(din);
  end

endmodule
