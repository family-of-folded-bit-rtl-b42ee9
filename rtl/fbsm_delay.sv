// Buffer of DEPTH one-bit latches forming a plain shift register.
//
// The folded multiplier keeps every intermediate bit in such buffers until
// the folding schedule consumes it: an (N-1)-latch and an N-latch buffer
// on the sum path between neighbouring processing elements, and an N-latch
// buffer on each carry-recycling path. Each latch shifts every clock
// cycle; a bit written in cycle t is at q in cycle t+DEPTH. DEPTH = 0
// gives a wire (the (N-1)-latch buffer when N = 1).
//
// clr is a synchronous clear that empties the buffer before a product
// starts, so that every partial sum and carry begins at zero. The document
// does not say how the latches are initialised; the clear is this design's
// choice (an FPGA shift-register primitive without reset could instead be
// flushed with zeros).
module fbsm_delay #(
  parameter int unsigned DEPTH = 16
) (
  input  logic clk,
  input  logic clr,
  input  logic d,
  output logic q
);

  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_shift
    logic [DEPTH-1:0] sr;

    always_ff @(posedge clk) begin
      if (clr) sr <= '0;
      else     sr <= (sr << 1) | DEPTH'(d);
    end

    assign q = sr[DEPTH-1];
  end

endmodule
