// Processing element (PE) of the folded bit-serial multiplier.
//
// A PE of the unfolded serial-parallel-serial multiplier is one AND gate
// and one full adder: it multiplies its bit of operand a by the broadcast
// bit of operand b and adds the product to the sum shifted in from its left
// neighbour and to its own carry of the previous cycle. Folded by a factor
// N, PE j carries out operations jN .. jN+N-1 in turn: in time instance u
// it works on bit a[jN+u] (a_bits[u]).
//
// Sum input selection (the switch in front of the adder):
//   * time instances 0..N-2: the PE's own sum of the previous cycle, taken
//     after N-1 latches of its output buffer (operation jN+u+1 produced it
//     one iteration earlier);
//   * time instance N-1: the sum leaving the left neighbour's buffer after
//     2N-1 latches (operation (j+1)N, or '0' for the leftmost PE).
// This split follows the folding delays (N-1 within a PE, 2N-1 between
// PEs) and the data-flow table of the two-PE example. The figure of the
// general family labels the switch the other way round ({0} for the
// neighbour); with a time-instance count that starts at the first operand
// bit, only the assignment used here gives the right product.
//
// The carry input is the PE's own carry from N cycles earlier, delivered by
// an N-latch buffer outside this module. The PE itself is purely
// combinational; with N = 1 it reduces to the unfolded PE and sum_own is
// left unused.
module fbsm_pe import fbsm_pkg::*; #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]              a_bits,    // a[jN+u] at index u
  input  logic [cnt_width(N)-1:0]   slot,      // time instance u
  input  logic                      b,         // broadcast bit of operand b
  input  logic                      sum_own,   // own sum, after N-1 latches
  input  logic                      sum_left,  // left neighbour's sum, after 2N-1 latches
  input  logic                      carry_in,  // own carry, after N latches
  output logic                      sum_out,
  output logic                      carry_out
);

  logic a_sel;
  logic pp;
  logic sum_in;
  logic take_left;  // sum input comes from the left neighbour

  // Bit of operand a for this time instance.
  assign a_sel = a_bits[slot];
  // Partial product: the AND gate.
  assign pp = a_sel & b;

  if (N == 1) begin : g_unfolded
    assign take_left = 1'b1;
    assign sum_in    = sum_left;
  end else begin : g_folded
    assign take_left = (slot == cnt_width(N)'(N - 1));
    assign sum_in    = take_left ? sum_left : sum_own;
  end

  // Full adder.
  assign sum_out   = pp ^ sum_in ^ carry_in;
  assign carry_out = (pp & sum_in) | (pp & carry_in) | (sum_in & carry_in);

endmodule
