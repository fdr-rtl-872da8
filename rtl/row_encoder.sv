// row_encoder: reports at the column base the address of the row being read.
//
// Every row owns a set of ADDR_W pull-down transistors whose gates are tied
// high or low to form that row's unique code. When the row's RowReadActive
// line is high its transistors are switched onto the shared column address
// bus. The bus idles high (precharged, read by sense amplifiers) and a row
// pulls a bus bit to ground wherever its code has a zero, so the bus is the
// bitwise AND of the codes of all active rows, and all ones when none is.
//
// Follows the document: one cell per row, 168 rows, pull-to-ground shared
// bus, 9-bit codes. The code of row r is the Gray code of r, which is what
// the document's address printout lists (row 167 reads 011110100 down to row
// 0 reading 000000000). Since bit 8 of every code is zero, the idle all-ones
// bus can never be mistaken for a row address; the `valid` output reports
// this. Purely combinational.
module row_encoder
  import fdr_pkg::*;
#(
  parameter int unsigned ROWS = 168
) (
  input  logic [ROWS-1:0]   row_read_active,  // RowReadActive, one per row
  output logic [ADDR_W-1:0] address,          // code seen at the column base
  output logic              valid             // bus differs from idle level
);

  always_comb begin
    address = '1;
    for (int unsigned r = 0; r < ROWS; r++)
      if (row_read_active[r]) address &= row_code(ADDR_W'(r));
  end

  assign valid = (address != '1);

endmodule
