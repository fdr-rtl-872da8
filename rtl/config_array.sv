// config_array: programming and readback of the per-pixel configuration.
//
// Every pixel holds CFG_BITS configuration bits: four trim bits (Trim0..Trim3)
// and a MASK bit. They are loaded through three shift registers:
//   * the FAST register, one stage per column, shifted serially from
//     CONFIG_IN to CONFIG_OUT (fast_shift);
//   * one SLOW register per column that runs down through all pixels of the
//     column, CFG_BITS stages per pixel; on slow_shift every column takes the
//     bit in its FAST stage into its top stage and moves every bit one stage
//     down;
//   * the READBACK register at the bottom, one stage per column, which
//     captures the bit leaving the bottom of every column on parallel_load and
//     shifts it out from TEST_IN towards READBACK_OUT on readback_shift.
// Programming one configuration bit of every pixel in a row takes COLS fast
// shifts and one slow shift. Rows are loaded from the bottom row up, and for
// each row Trim0, Trim1, Trim2, Trim3 and then MASK, so that after
// ROWS*CFG_BITS slow shifts pixel r holds in its stages (top to bottom) MASK,
// Trim3, Trim2, Trim1, Trim0. Reading back repeats slow shifts with a
// parallel load and COLS readback shifts after each; the bottom pixel's Trim0
// comes out first.
//
// From the document: the three registers, their direction, the 2*84 columns
// and 2*84 rows, the parallel load and test input of the readback register,
// each register's own reset RstB, and the load order of the simulation log.
// The pixel configuration leaves as one packed array in storage order, so
// stage k of a column is bit k % CFG_BITS of pixel row k / CFG_BITS.
// This design's choices: the two-phase clocks (phi1, phi2) of each register
// are replaced by one clock with a shift enable per register, the resets are
// asynchronous and active low, stage 0 of the FAST and READBACK registers
// belongs to column 0 next to CONFIG_IN / TEST_IN, and a shift has priority
// over a parallel load issued in the same cycle.
module config_array
  import fdr_pkg::*;
#(
  parameter int unsigned ROWS = 168,
  parameter int unsigned COLS = 168
) (
  input  logic clk,
  // FAST register
  input  logic fast_rst_b,
  input  logic fast_shift,
  input  logic config_in,
  output logic config_out,
  // SLOW registers through the pixels
  input  logic slow_rst_b,
  input  logic slow_shift,
  // READBACK register
  input  logic rb_rst_b,
  input  logic readback_shift,
  input  logic parallel_load,
  input  logic test_in,
  output logic readback_out,
  // configuration held by every pixel
  // pixel_cfg[r][j][c]: bit j of the pixel in row r, column c, with
  // j = CFG_MASK, CFG_TRIM3, CFG_TRIM2, CFG_TRIM1, CFG_TRIM0 (top to bottom)
  output logic [ROWS-1:0][CFG_BITS-1:0][0:COLS-1] pixel_cfg
);

  localparam int unsigned STAGES = ROWS * CFG_BITS;

  logic [0:COLS-1] fast_sr;              // index = column
  logic [0:COLS-1] rb_sr;
  // All SLOW registers side by side: stage k = r*CFG_BITS + j of every
  // column is the COLS-bit slice k, stage 0 at the top of the array.
  logic [STAGES-1:0][0:COLS-1] slow_sr;

  always_ff @(posedge clk or negedge fast_rst_b) begin
    if (!fast_rst_b)     fast_sr <= '0;
    else if (fast_shift) fast_sr <= {config_in, fast_sr[0:COLS-2]};
  end
  assign config_out = fast_sr[COLS-1];

  always_ff @(posedge clk or negedge slow_rst_b) begin
    if (!slow_rst_b)     slow_sr <= '0;
    else if (slow_shift) slow_sr <= {slow_sr[STAGES-2:0], fast_sr};
  end

  always_ff @(posedge clk or negedge rb_rst_b) begin
    if (!rb_rst_b)           rb_sr <= '0;
    else if (readback_shift) rb_sr <= {test_in, rb_sr[0:COLS-2]};
    else if (parallel_load)  rb_sr <= slow_sr[STAGES-1];
  end
  assign readback_out = rb_sr[COLS-1];

  assign pixel_cfg = slow_sr;

endmodule
