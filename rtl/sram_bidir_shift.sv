// sram_bidir_shift: a row's hit memory, a bidirectional shift register.
//
// Words enter at stage 0 and every stored word moves one stage deeper on a
// write (push). On a read (pop) the word at stage 0 is taken and every word
// moves one stage back towards the port, so the memory hands words back last
// in, first out. Each stage carries a valid bit; the OR of all DEPTH valid
// bits (the document's 20-input OR gate, with D<19> the deepest stage) tells
// the readout that the row still holds data. Writing into a full memory
// shifts the deepest word out and loses it; `overflow` pulses when that
// happens.
//
// From the document: bidirectional shift-register SRAM cells with a special
// input cell, 20 stages (the 20-input OR), and the 22-bit word with the
// timecode in the MSBs. This design's choices: one clock edge per shift (the
// silicon uses a three-phase clock, phi1-phi3, per shift), a synchronous
// active-low reset that clears the valid bits, and losing the oldest word on
// overflow. A push and a pop in the same cycle perform the push only.
module sram_bidir_shift
  import fdr_pkg::*;
#(
  parameter int unsigned DEPTH = 20,
  parameter int unsigned WIDTH = WORD_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,       // shift a word in
  input  logic [WIDTH-1:0] push_word,
  input  logic             pop,        // shift the port word out
  output logic [WIDTH-1:0] port_word,  // word at stage 0
  output logic             not_empty,  // OR of all stage valid bits
  output logic             full,       // deepest stage valid
  output logic             overflow    // a push lost the deepest word
);

  logic [WIDTH-1:0] data  [DEPTH];
  logic [DEPTH-1:0] valid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid    <= '0;
      overflow <= 1'b0;
    end else begin
      overflow <= push && valid[DEPTH-1];
      if (push) begin
        valid <= {valid[DEPTH-2:0], 1'b1};
      end else if (pop) begin
        valid <= {1'b0, valid[DEPTH-1:1]};
      end
    end
  end

  always_ff @(posedge clk) begin
    if (push) begin
      data[0] <= push_word;
      for (int unsigned i = 1; i < DEPTH; i++) data[i] <= data[i-1];
    end else if (pop) begin
      for (int unsigned i = 0; i < DEPTH - 1; i++) data[i] <= data[i+1];
      data[DEPTH-1] <= '0;
    end
  end

  assign port_word = data[0];
  assign not_empty = |valid;
  assign full      = valid[DEPTH-1];

  a_pop_empty: assert property (@(posedge clk) disable iff (!rst_n)
                                (pop && !push) |-> not_empty)
    else $error("sram_bidir_shift: pop from an empty memory");

endmodule
