// dac_current_output_model: behavioural model of the analog current sources,
// differential switches and output summing of the DAC (not synthesizable
// hardware; a model of analog circuitry).
//
// Every cell holds a current source I_cell and a differential switch: q = 1
// steers the cell current to I_OUT, q = 0 to the complementary output. A unary
// cell carries 4 LSB, the two binary cells 1 and 2 LSB, so I_OUT = k * I_LSB
// with k the number of switched-on LSB units (0..1023) and
// I_OUT + I_OUTB = IFS_MA. The full-scale current of 3.33 mA is the document's;
// the ideal, mismatch-free sources with instantaneous settling are a modelling
// choice. The outputs follow the switch states combinationally.
module dac_current_output_model
  import dac_pkg::*;
#(
  parameter real IFS_MA = 3.33   // full-scale output current, mA
) (
  input  logic [N_SUB-1:0][N_ROWS*N_COLS-2:0] msb_q,
  input  logic [N_ULSB_CELLS-1:0]             ulsb_q,
  input  logic [LLSB_BITS-1:0]                lsb_q,
  output real                                 iout_ma,
  output real                                 ioutb_ma
);

  localparam real I_LSB_MA = IFS_MA / real'((1 << N_BITS) - 1);

  int units;

  always_comb begin
    units = 0;
    for (int s = 0; s < int'(N_SUB); s++)
      for (int c = 0; c < int'(N_ROWS*N_COLS) - 1; c++)
        units += int'(msb_q[s][c]) * int'(UNARY_WEIGHT);
    for (int k = 0; k < int'(N_ULSB_CELLS); k++)
      units += int'(ulsb_q[k]) * int'(UNARY_WEIGHT);
    for (int b = 0; b < int'(LLSB_BITS); b++)
      units += int'(lsb_q[b]) << b;
  end

  always_comb begin
    iout_ma  = real'(units) * I_LSB_MA;
    ioutb_ma = real'(int'((1 << N_BITS) - 1) - units) * I_LSB_MA;
  end

endmodule
