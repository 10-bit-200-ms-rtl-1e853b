// dac_tb_pkg: reference functions shared by the DAC testbenches. They work
// from the code value and the cell rule, not from the RTL's decoders.
package dac_tb_pkg;

  // State of row i (1..8) of a subcell array for a 6-bit MSB code c:
  // 2 = full, 1 = partially filled (holds c mod 8 cells), 0 = empty.
  function automatic int row_state(int c, int i);
    if (c >= 8 * i)            return 2;
    else if (c >= 8 * (i - 1)) return 1;
    else                       return 0;
  endfunction

  // Does row i need a clock edge when the MSB code goes from c_pre to c_now?
  // Worked out from the cells: true when some cell of the row changes value,
  // or the row was or is partially filled (its cells follow the column lines).
  function automatic logic row_needs_clock(int c_pre, int c_now, int i);
    int sp, sn;
    sp = row_state(c_pre, i);
    sn = row_state(c_now, i);
    return (sp != sn) || (sp == 1) || (sn == 1);
  endfunction

  // Expected switch state of the 63 cells of a subcell array for MSB code c:
  // the first c cells in row-major order are on.
  function automatic logic [62:0] subcell_pattern(int c);
    logic [62:0] p;
    for (int k = 0; k < 63; k++) p[k] = (k < c);
    return p;
  endfunction

endpackage
