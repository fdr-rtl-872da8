// column_readout: reads the row memories of one logic column in turn.
//
// While `reading` is high, the lowest-numbered row whose memory still holds
// data gets its RowReadActive line raised for one clock. That row's port word
// is captured and popped at the clock edge, and the row encoder at the column
// base turns the RowReadActive lines into the row's 9-bit address, captured
// with the word. So one word leaves the column per clock, rd_valid marking the
// registered outputs, and a row is emptied (last written word first) before
// the next row is read.
//
// The row encoder and its use to report the address of the row being read
// follow the document; the lowest-row-first scan and the registered output are
// this design's choices.
module column_readout
  import fdr_pkg::*;
#(
  parameter int unsigned ROWS = 168
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               reading,
  input  logic [ROWS-1:0]    row_not_empty,
  input  hit_word_t          row_word [ROWS],
  output logic [ROWS-1:0]    row_read_active,
  output logic               rd_valid,
  output hit_word_t          rd_word,
  output logic [ADDR_W-1:0]  rd_address
);

  logic [ADDR_W-1:0] bus_address;
  logic              bus_valid;
  hit_word_t         sel_word;

  always_comb begin
    logic found;
    found           = 1'b0;
    row_read_active = '0;
    sel_word        = '0;
    if (reading) begin
      for (int unsigned r = 0; r < ROWS; r++) begin
        if (row_not_empty[r] && !found) begin
          row_read_active[r] = 1'b1;
          sel_word           = row_word[r];
          found              = 1'b1;
        end
      end
    end
  end

  row_encoder #(.ROWS(ROWS)) u_enc (
    .row_read_active(row_read_active),
    .address        (bus_address),
    .valid          (bus_valid)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_valid   <= 1'b0;
      rd_word    <= '0;
      rd_address <= '0;
    end else begin
      rd_valid <= bus_valid;
      if (bus_valid) begin
        rd_word    <= sel_word;
        rd_address <= bus_address;
      end
    end
  end

endmodule
