// cs_dac_top: 10-bit segmented (6+2+2) current-steering DAC with
// data-dependent row clock gating.
//
// The input code is registered, then split: the three UMSBs go to the
// clock-gating row decoder, the three LMSBs to the column decoder, the two
// ULSBs to the ULSB decoder and the two LLSBs straight to the binary cells.
// The 255 unary cells sit in four 8x8 subcell arrays that share row data,
// column lines and row clocks. Only rows whose data can change receive a clock
// edge (row_clk_en reports which rows are enabled for the coming edge); the
// ULSB and LLSB cells and the column path are clocked every cycle.
//
// Timing: din is sampled on a rising clk edge; the cells switch on the next
// rising edge, so the cell states (msb_q, ulsb_q, lsb_q) and the modelled output
// currents follow din with two cycles of latency. The architecture follows the
// document; the latency, reset and output-port set are this design's choices.
// The analog current sources are a behavioural model (dac_current_output_model).
module cs_dac_top
  import dac_pkg::*;
(
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic [N_BITS-1:0]                    din,
  output logic [N_ROWS-1:0]                    row_clk_en,  // clock_enable<1:8>
  output logic [N_SUB-1:0][N_ROWS*N_COLS-2:0]  msb_q,       // MSB cell switch states
  output logic [N_ULSB_CELLS-1:0]              ulsb_q,      // ULSB cell switch states
  output logic [LLSB_BITS-1:0]                 lsb_q,       // LLSB cell switch states
  output real                                  iout_ma,     // modelled I_OUT
  output real                                  ioutb_ma     // modelled complementary output
);

  dac_code_t                code_q;
  logic [N_ROWS-1:0]        row;
  logic [N_ROWS-1:0]        row_clk;
  logic [N_COLS-1:0]        col;
  logic [N_ULSB_CELLS-1:0]  ulsb_therm;

  input_register u_in (
    .clk  (clk),
    .rst_n(rst_n),
    .din  (din),
    .q    (code_q)
  );

  clock_gating_row_decoder u_rowdec (
    .clk         (clk),
    .rst_n       (rst_n),
    .umsb        (code_q.umsb),
    .row         (row),
    .clock_enable(row_clk_en),
    .row_clk     (row_clk)
  );

  column_decoder u_coldec (
    .lmsb(code_q.lmsb),
    .col (col)
  );

  ulsb_decoder u_ulsbdec (
    .ulsb (code_q.ulsb),
    .therm(ulsb_therm)
  );

  msb_cell_array u_msb (
    .clk       (clk),
    .rst_n     (rst_n),
    .row       (row),
    .col       (col),
    .row_clk   (row_clk),
    .ulsb_therm(ulsb_therm),
    .msb_q     (msb_q),
    .ulsb_q    (ulsb_q)
  );

  lsb_cell_array u_lsb (
    .clk  (clk),
    .rst_n(rst_n),
    .llsb (code_q.llsb),
    .q    (lsb_q)
  );

  dac_current_output_model u_out (
    .msb_q   (msb_q),
    .ulsb_q  (ulsb_q),
    .lsb_q   (lsb_q),
    .iout_ma (iout_ma),
    .ioutb_ma(ioutb_ma)
  );

endmodule
