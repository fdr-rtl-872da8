// fdr_pkg: constants and types shared by the row-control logic.
//
// The hit word written into a row's SRAM is 22 bits: the 13-bit timecode in
// the most significant bits, then the 3-bit bank code and the 6-bit hit
// pattern of that bank in the least significant bits (timecode at the MSB end
// and data code in the LSBs follows the document; the field widths are read
// from its readout log). The seven bank codes are the document's, in bank
// position order 0..6. Row addresses are 9-bit Gray codes of the row index.
package fdr_pkg;

  localparam int unsigned TIME_W  = 13;   // timecode width
  localparam int unsigned BANK_W  = 3;    // bank code width
  localparam int unsigned PATT_W  = 6;    // pixels per bank (mux6)
  localparam int unsigned NBANKS  = 7;    // banks per row (mux6x7)
  localparam int unsigned NHITS   = PATT_W * NBANKS;  // 42 hit inputs per row
  localparam int unsigned WORD_W  = TIME_W + BANK_W + PATT_W;  // 22
  localparam int unsigned ADDR_W  = 9;    // row encoder code width
  localparam int unsigned CFG_BITS = 5;   // Trim0..Trim3 and MASK per pixel

  // Position of each configuration bit in a pixel's SLOW-register stages,
  // counted from the top of the column.
  localparam int unsigned CFG_MASK  = 0;
  localparam int unsigned CFG_TRIM3 = 1;
  localparam int unsigned CFG_TRIM2 = 2;
  localparam int unsigned CFG_TRIM1 = 3;
  localparam int unsigned CFG_TRIM0 = 4;

  typedef logic [TIME_W-1:0] timecode_t;
  typedef logic [BANK_W-1:0] bank_code_t;
  typedef logic [PATT_W-1:0] pattern_t;

  typedef struct packed {
    timecode_t  time_code;
    bank_code_t bank;
    pattern_t   pattern;
  } hit_word_t;

  // Bank assignment codes, bank position 0 (leftmost) to 6.
  localparam bank_code_t BANK_CODE [NBANKS] = '{3'b100, 3'b101, 3'b111, 3'b110,
                                                3'b010, 3'b011, 3'b001};

  // Unique address code of a row: reflected binary Gray code of its index.
  function automatic logic [ADDR_W-1:0] row_code(input logic [ADDR_W-1:0] row);
    logic [ADDR_W-1:0] b;
    b = row;
    return b ^ (b >> 1);
  endfunction

endpackage
