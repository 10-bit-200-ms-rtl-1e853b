// lsb_cell_array: the two binary-weighted LLSB current cells.
//
// The two lower LSBs drive one cell of weight 1 LSB (bit 0) and one of weight
// 2 LSB (bit 1) directly, without decoding. Each cell stores its bit on the
// rising edge of the ungated sampling clock, one cycle after the input
// registers, in step with the unary cells. The binary weighting is the
// document's; using the same cell storage as the unary cells is this design's
// choice, made so that all cells switch on the same edge.
module lsb_cell_array
  import dac_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [LLSB_BITS-1:0] llsb,
  output logic [LLSB_BITS-1:0] q      // bit b steers 2^b LSB
);

  for (genvar b = 0; b < LLSB_BITS; b++) begin : g_bit
    logic qb_unused;
    current_cell u_cell (
      .clk     (clk),
      .rst_n   (rst_n),
      .row_cur (llsb[b]),
      .row_prev(1'b1),
      .col     (1'b0),
      .q       (q[b]),
      .qb      (qb_unused)
    );
  end

endmodule
