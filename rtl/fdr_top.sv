// fdr_top: row-control logic of a ROWS x PIXEL_COLS monolithic pixel sensor.
//
// Hits. Each pixel's hit signal is gated by the pixel's MASK bit and enters a
// ping-pong latch-hold cell that samples it on both edges of Hold. The pixels
// of a row are served by LOGIC_COLS logic columns of 42 pixels each; in every
// row, each logic column has a hit_row block (7 banks of 6 pixels, bank
// multiplexer, 20-word bidirectional shift memory). After every Hold toggle
// the master controller strobes all rows, and each row writes one 22-bit word
// {timecode, bank code, pattern} per bank that saw a hit.
//
// Readout. When readout is started, each logic column's readout pops the
// memories of its rows one word per clock, lowest row first and, within a
// row, last written first. The row encoder at the column base supplies the
// 9-bit address of the row being read, output with the word.
//
// Configuration. The config_array loads the four trim bits and the MASK bit of
// every pixel through the FAST, SLOW and READBACK shift registers; the
// configuration leaves on the `pixel_cfg` port, whose trim bits go to the
// pixels' analog front ends.
//
// Follows the document: 168 x 168 pixels (2*84 each way), 42 hits per row
// block in 7 banks of 6, the 22-bit word, 168-row encoder, Hold toggling
// every 150 ns, active-low OVERRIDE and SafeB, and the configuration scheme.
// This design's choices: four logic columns of 42 pixels (168 / 42), pixel p
// of a row going to logic column p/42, bank (p%42)/6 and pattern bit
// 5 - p%6, MASK = 1 disabling the pixel, one system clock for all logic, and
// the readout order. The pixel front ends, monostables, sense amplifiers,
// clock buffers and pads are analog and lie outside this RTL.
module fdr_top
  import fdr_pkg::*;
#(
  parameter int unsigned ROWS          = 168,
  parameter int unsigned PIXEL_COLS    = 168,
  parameter int unsigned SRAM_DEPTH    = 20,
  parameter int unsigned HOLD_CYCLES   = 15,
  parameter int unsigned SETTLE_CYCLES = 1,
  localparam int unsigned LOGIC_COLS   = PIXEL_COLS / NHITS
) (
  input  logic clk,
  input  logic rst_n,
  // acquisition and readout control
  input  logic acquire,
  input  logic readout_start,
  input  logic safe_b,            // SafeB: latch-hold safe power-down, active low
  input  logic override_b,        // OVERRIDE, active low: write every bank
  input  logic [ROWS-1:0][0:PIXEL_COLS-1] pixel_hit,  // [row][column]
  output logic hold,
  output timecode_t timecode,
  output logic reading,
  output logic readout_done,
  output logic overflow,          // a row memory lost a word (pulse)
  // readout, one stream per logic column
  output logic      [LOGIC_COLS-1:0] rd_valid,
  output hit_word_t                  rd_word    [LOGIC_COLS],
  output logic [ADDR_W-1:0]          rd_address [LOGIC_COLS],
  // configuration shift registers
  input  logic fast_rst_b,
  input  logic fast_shift,
  input  logic config_in,
  output logic config_out,
  input  logic slow_rst_b,
  input  logic slow_shift,
  input  logic rb_rst_b,
  input  logic readback_shift,
  input  logic parallel_load,
  input  logic test_in,
  output logic readback_out,
  // configuration of every pixel, [row][bit][column], bit order as CFG_* in
  // fdr_pkg; the trim bits go to the analog front ends
  output logic [ROWS-1:0][CFG_BITS-1:0][0:PIXEL_COLS-1] pixel_cfg
);
  logic sample_strobe;

  logic [LOGIC_COLS-1:0][ROWS-1:0] not_empty, busy, ovf, read_active;
  hit_word_t row_word [LOGIC_COLS][ROWS];

  config_array #(.ROWS(ROWS), .COLS(PIXEL_COLS)) u_cfg (
    .clk           (clk),
    .fast_rst_b    (fast_rst_b),
    .fast_shift    (fast_shift),
    .config_in     (config_in),
    .config_out    (config_out),
    .slow_rst_b    (slow_rst_b),
    .slow_shift    (slow_shift),
    .rb_rst_b      (rb_rst_b),
    .readback_shift(readback_shift),
    .parallel_load (parallel_load),
    .test_in       (test_in),
    .readback_out  (readback_out),
    .pixel_cfg     (pixel_cfg)
  );

  master_controller #(.HOLD_CYCLES(HOLD_CYCLES), .SETTLE_CYCLES(SETTLE_CYCLES)) u_ctrl (
    .clk          (clk),
    .rst_n        (rst_n),
    .acquire      (acquire),
    .readout_start(readout_start),
    .data_stored  (|not_empty),
    .write_busy   (|busy),
    .hold         (hold),
    .timecode     (timecode),
    .sample_strobe(sample_strobe),
    .reading      (reading),
    .readout_done (readout_done)
  );

  for (genvar lc = 0; lc < LOGIC_COLS; lc++) begin : g_col
    for (genvar r = 0; r < ROWS; r++) begin : g_row
      // pixel lc*NHITS + p lands in bank p / 6, pattern bit 5 - p % 6
      logic [0:NBANKS-1][PATT_W-1:0] hits;
      assign hits = pixel_hit[r][lc*NHITS +: NHITS] & ~pixel_cfg[r][CFG_MASK][lc*NHITS +: NHITS];
      hit_row #(.DEPTH(SRAM_DEPTH)) u_row (
        .clk            (clk),
        .rst_n          (rst_n),
        .hit_in         (hits),
        .hold           (hold),
        .safe_b         (safe_b),
        .override_b     (override_b),
        .timecode       (timecode),
        .sample_strobe  (sample_strobe),
        .row_read_active(read_active[lc][r]),
        .read_word      (row_word[lc][r]),
        .not_empty      (not_empty[lc][r]),
        .write_busy     (busy[lc][r]),
        .overflow       (ovf[lc][r]),
        .data_valid     ()
      );
    end

    column_readout #(.ROWS(ROWS)) u_readout (
      .clk            (clk),
      .rst_n          (rst_n),
      .reading        (reading),
      .row_not_empty  (not_empty[lc]),
      .row_word       (row_word[lc]),
      .row_read_active(read_active[lc]),
      .rd_valid       (rd_valid[lc]),
      .rd_word        (rd_word[lc]),
      .rd_address     (rd_address[lc])
    );
  end

  assign overflow = |ovf;

endmodule
