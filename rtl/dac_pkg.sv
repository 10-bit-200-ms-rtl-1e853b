// dac_pkg: constants and types shared by the segmented current-steering DAC.
//
// The 10-bit input code is split 6+2+2: three upper MSBs (UMSB) pick the
// thermometer row, three lower MSBs (LMSB) pick the thermometer column, two
// upper LSBs (ULSB) drive three unary cells and two lower LSBs (LLSB) drive two
// binary-weighted cells. The segmentation and field widths follow the
// document; the packed struct layout (MSB field first) is this design's choice.
package dac_pkg;

  localparam int unsigned N_BITS      = 10;  // DAC resolution
  localparam int unsigned UMSB_BITS   = 3;   // row-decoder bits
  localparam int unsigned LMSB_BITS   = 3;   // column-decoder bits
  localparam int unsigned ULSB_BITS   = 2;   // unary upper-LSB bits
  localparam int unsigned LLSB_BITS   = 2;   // binary lower-LSB bits
  localparam int unsigned N_ROWS      = 1 << UMSB_BITS;       // 8 rows per subcell array
  localparam int unsigned N_COLS      = 1 << LMSB_BITS;       // 8 columns per subcell array
  localparam int unsigned N_SUB       = 4;                    // symmetric subcell arrays
  localparam int unsigned N_ULSB_CELLS = (1 << ULSB_BITS) - 1; // 3 unary ULSB cells
  // Weight, in LSBs, of one unary cell (an MSB unit of 16 LSB is split over the four
  // subcell arrays, so every unary cell carries 4 LSB, the same as an ULSB cell).
  localparam int unsigned UNARY_WEIGHT = 1 << LLSB_BITS;

  typedef struct packed {
    logic [UMSB_BITS-1:0] umsb;
    logic [LMSB_BITS-1:0] lmsb;
    logic [ULSB_BITS-1:0] ulsb;
    logic [LLSB_BITS-1:0] llsb;
  } dac_code_t;

endpackage
