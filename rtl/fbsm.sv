// Folded bit-serial multiplier (FBSM), top level.
//
// An unsigned LA x lb multiplier with LA = K*N. Operand a is applied in
// parallel, operand b enters one bit at a time, LSB first, and the
// LA+lb-bit product leaves one bit at a time, LSB first. It is the
// serial-parallel-serial multiplier (one AND gate and one full adder per
// bit of a, sums shifting right, carries recycled in place) folded by a
// factor N: K processing elements each perform N of the LA bit-level
// operations, PE j the operations on a[jN] .. a[jN+N-1], one per cycle.
//
// Slice j (PE j, left to right is j = K-1 .. 0):
//
//        left sum ──┐                      ┌── own sum (after N-1 latches)
//   a[jN+u], b ──> PE j ── sum ──> (N-1)D ──> ND ──> to PE j-1 (PE 0: p)
//                   ^ └─ carry ──> ND ──┐
//                   └───────────────────┘
//
// PE j adds the own sum in time instances 0..N-2 and the left neighbour's
// sum (after 2N-1 latches; '0' for PE K-1) in time instance N-1. The
// buffer of PE 0 ends in the product output p. With N = 1 the structure is
// the unfolded serial multiplier.
//
// Interface and timing:
//   * start (while busy is low) captures a and lb and clears all latches.
//   * From the next cycle, in each iteration l < lb the multiplier raises
//     b_take for one cycle (time instance 0) and consumes b_in, which
//     must then hold b[l]. Iterations lb .. LA use b = 0 to shift out the
//     upper product bits.
//   * p_valid marks product bits on p: the first 2N cycles after start
//     (2N-1 cycles after the first operation), then one every N cycles,
//     LA+lb bits in all; done marks the last, and the multiplier is idle
//     again in the next cycle unless start came with done. A product takes N*(LA+lb+1)+1 cycles
//     including the start cycle.
//
// rst_n is a synchronous, active-low reset of the sequencer and the operand
// register; the buffers are cleared by start instead.
//
// The PE structure, the buffer lengths on the sum path, the folding
// schedule and the latency follow the document. The carry-recycling buffer
// here has N latches, where the document's figures and latch count give
// N-1; N is the delay its folding equation yields for the carry loop, and
// the only value for which N = 1 reduces to the unfolded multiplier's
// single carry latch. Registering a at start, the clear, the b request
// handshake and the operand-length input are this design's own choices.
module fbsm import fbsm_pkg::*; #(
  parameter int unsigned K   = 8,   // processing elements
  parameter int unsigned N   = 16,  // folding factor
  parameter int unsigned LBW = 16   // width of the operand-b length input
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [K*N-1:0] a,       // operand a, parallel
  input  logic [LBW-1:0] lb,      // length of operand b in bits
  input  logic           b_in,    // operand b, serial, LSB first
  output logic           b_take,  // b_in consumed this cycle
  output logic           busy,
  output logic           p,       // product, serial, LSB first
  output logic           p_valid,
  output logic           done
);

  localparam int unsigned LA = K * N;
  localparam int unsigned SW = cnt_width(N);

  logic [LA-1:0] a_q;
  logic [SW-1:0] slot;
  logic          b_bc;
  logic          clr;

  // Per-PE signals; index K is the '0' entering the leftmost PE.
  logic [K:0]   buf_out;   // sum after 2N-1 latches
  logic [K-1:0] sum_out;
  logic [K-1:0] sum_tap;   // sum after N-1 latches
  logic [K-1:0] carry_out;
  logic [K-1:0] carry_in;

  fbsm_ctrl #(.LA(LA), .N(N), .LBW(LBW)) u_ctrl (
    .clk, .rst_n, .start, .lb, .b_in, .b_take, .b_bc, .slot, .clr,
    .busy, .p_valid, .done
  );

  // Operand a is held for the whole product.
  always_ff @(posedge clk) begin
    if (!rst_n)   a_q <= '0;
    else if (clr) a_q <= a;
  end

  assign buf_out[K] = 1'b0;

  for (genvar j = 0; j < K; j++) begin : g_pe
    fbsm_pe #(.N(N)) u_pe (
      .a_bits   (a_q[j*N +: N]),
      .slot     (slot),
      .b        (b_bc),
      .sum_own  (sum_tap[j]),
      .sum_left (buf_out[j+1]),
      .carry_in (carry_in[j]),
      .sum_out  (sum_out[j]),
      .carry_out(carry_out[j])
    );

    // Sum buffer, first part: N-1 latches, tapped for the PE's own use.
    fbsm_delay #(.DEPTH(N - 1)) u_sum_own (
      .clk, .clr, .d(sum_out[j]), .q(sum_tap[j])
    );
    // Sum buffer, second part: N latches towards the right neighbour.
    fbsm_delay #(.DEPTH(N)) u_sum_right (
      .clk, .clr, .d(sum_tap[j]), .q(buf_out[j])
    );
    // Carry-recycling buffer.
    fbsm_delay #(.DEPTH(N)) u_carry (
      .clk, .clr, .d(carry_out[j]), .q(carry_in[j])
    );
  end

  assign p = buf_out[0];

endmodule
