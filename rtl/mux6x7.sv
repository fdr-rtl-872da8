// mux6x7: selects which of a row's seven hit banks is written next.
//
// The 42 latched hits of a row form 7 banks of 6 pixels (mux6 cells). A bank
// has data when any of its six hits is set, or for every bank while the
// active-low OVERRIDE input is asserted (a test mode that writes all banks).
// Of the banks that have data and are still marked pending by the write
// sequencer, the one in the highest bank position is selected; DataValid
// goes high and the bank's code and pattern are driven out. Without valid
// data the data code lines are pulled to zero.
//
// From the document: 7 banks of 6, the bank codes, the DataValid output,
// OVERRIDE being active low and the data code resting at zero unless valid.
// The selection order (highest bank position first) is this design's choice,
// made so that a last-in first-out SRAM hands banks back in position order
// 0..6, matching the readout order in the document's simulation log.
// Purely combinational.
module mux6x7
  import fdr_pkg::*;
(
  input  logic [0:NBANKS-1][PATT_W-1:0] hits,      // latched hits, bank 0 first
  input  logic [NBANKS-1:0]             pending,   // banks not yet written
  input  logic                          override_b,// OVERRIDE, active low
  output logic [NBANKS-1:0]             has_data,  // bank has hits (or override)
  output logic                          data_valid,// DataValid
  output logic [NBANKS-1:0]             select,    // one-hot selected bank
  output bank_code_t                    bank_code, // code of the selected bank
  output pattern_t                      data_code  // pattern of the selected bank
);

  always_comb begin
    for (int unsigned b = 0; b < NBANKS; b++)
      has_data[b] = (hits[b] != '0) || !override_b;
  end

  always_comb begin
    select     = '0;
    data_valid = 1'b0;
    bank_code  = '0;
    data_code  = '0;
    for (int b = NBANKS - 1; b >= 0; b--) begin
      if (!data_valid && has_data[b] && pending[b]) begin
        data_valid = 1'b1;
        select[b]  = 1'b1;
        bank_code  = BANK_CODE[b];
        data_code  = hits[b];
      end
    end
  end

endmodule
