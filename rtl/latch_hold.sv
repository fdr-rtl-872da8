// latch_hold: ping-pong hit sampler with a safe power-down mode.
//
// Two storage paths sample the hit input on alternate phases of Hold, so the
// hit is captured on both the rising and the falling edge of Hold and the
// captured value is held for one half period (150 ns at the design rate).
//   * Path A tracks Hit In while Hold is low and drives Latched Hit while
//     Hold is high: it holds the value present at the rising edge.
//   * Path B tracks Hit In while Hold is high and drives Latched Hit while
//     Hold is low: it holds the value present at the falling edge.
// HoldB is the complement of Hold and is derived internally. WIDTH cells
// with common Hold and SafeB lines are built as one vector (a row's 42 hits).
//
// Safe mode (SafeB low) forces path A's storage node to the no-hit state.
// With Hold high this is the safe, zero-current state and Latched Hit is 0;
// with Hold low path A cannot capture a hit, so operation is incorrect, as in
// the document's state table. The ping-pong structure and the state table are
// the document's; modelling the forced node as "no hit" is this design's
// reading of the circuit.
//
// The two storage nodes are level-sensitive latches on purpose: they are the
// circuit's storage, and the latch warnings a linter gives for them stand.
module latch_hold #(
  parameter int unsigned WIDTH = 1     // number of cells sharing Hold and SafeB
) (
  input  logic [WIDTH-1:0] hit_in,      // Hit In from the pixels
  input  logic             hold,        // Hold, toggles every sampling interval
  input  logic             safe_b,      // SafeB, active-low safe power-down
  output logic [WIDTH-1:0] latched_hit  // Latched Hit
);

  logic [WIDTH-1:0] store_a, store_b;

  always_latch begin
    if (!safe_b)    store_a = '0;
    else if (!hold) store_a = hit_in;
  end

  always_latch begin
    if (hold) store_b = hit_in;
  end

  assign latched_hit = hold ? store_a : store_b;

endmodule
