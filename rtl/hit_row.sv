// hit_row: the hit logic of one row: latches, bank multiplexer and memory.
//
// Each of the row's 42 hit inputs passes through a latch_hold cell clocked by
// the shared Hold signal, so the row sees the hit state captured at the last
// Hold edge. When the master controller signals a new sample
// (sample_strobe), the write sequencer marks every bank with data as pending.
// On each following clock the mux6x7 picks one pending bank and the
// sequencer writes {timecode, bank code, pattern} into the row's
// bidirectional shift memory, so a sample with k banks holding hits takes k
// cycles. During readout, row_read_active pops the word at the memory port.
//
// Interface timing: sample_strobe is one cycle; the timecode must be stable
// from sample_strobe until the last write; write_busy is high while banks are
// still pending. row_read_active must only be raised while write_busy is low.
// The assembly of these parts into a row follows the document's simulation
// log; the one-write-per-cycle sequencer is this design's choice.
module hit_row
  import fdr_pkg::*;
#(
  parameter int unsigned DEPTH = 20
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [0:NBANKS-1][PATT_W-1:0] hit_in,          // from the pixels
  input  logic                          hold,
  input  logic                          safe_b,
  input  logic                          override_b,
  input  timecode_t                     timecode,
  input  logic                          sample_strobe,
  input  logic                          row_read_active,
  output hit_word_t                     read_word,
  output logic                          not_empty,
  output logic                          write_busy,
  output logic                          overflow,
  output logic                          data_valid        // DataValid
);

  logic [0:NBANKS-1][PATT_W-1:0] latched;
  logic [NBANKS-1:0] pending, has_data, select;
  bank_code_t bank_code;
  pattern_t   data_code;
  hit_word_t  wr_word;

  latch_hold #(.WIDTH(NHITS)) u_latch (
    .hit_in     (hit_in),
    .hold       (hold),
    .safe_b     (safe_b),
    .latched_hit(latched)
  );

  mux6x7 u_mux (
    .hits      (latched),
    .pending   (pending),
    .override_b(override_b),
    .has_data  (has_data),
    .data_valid(data_valid),
    .select    (select),
    .bank_code (bank_code),
    .data_code (data_code)
  );

  always_ff @(posedge clk) begin
    if (!rst_n)             pending <= '0;
    else if (sample_strobe) pending <= has_data;
    else if (data_valid)    pending <= pending & ~select;
  end

  assign write_busy = (pending != '0);

  assign wr_word = '{time_code: timecode, bank: bank_code, pattern: data_code};

  sram_bidir_shift #(.DEPTH(DEPTH), .WIDTH(WORD_W)) u_sram (
    .clk      (clk),
    .rst_n    (rst_n),
    .push     (data_valid && !sample_strobe),
    .push_word(wr_word),
    .pop      (row_read_active),
    .port_word(read_word),
    .not_empty(not_empty),
    .full     (),
    .overflow (overflow)
  );

  a_no_read_while_writing: assert property (@(posedge clk) disable iff (!rst_n)
                                            row_read_active |-> !write_busy)
    else $error("hit_row: RowReadActive raised while banks are still being written");

endmodule
