// Shared definitions of the folded bit-serial multiplier (FBSM).
//
// The multiplier folds the L_a bit-level operations of a serial-parallel-
// serial (SPS) multiplier onto K processing elements, N operations each
// (L_a = K*N). Every clock cycle is one "time instance" u in 0..N-1 of the
// folding schedule; this package holds the width of the time-instance
// counter and the state type of the sequencer.
package fbsm_pkg;

  // Width of a counter that holds 0..n-1, at least one bit.
  function automatic int unsigned cnt_width(input int unsigned n);
    return (n <= 2) ? 1 : $clog2(n);
  endfunction

  // Sequencer state: waiting for a start pulse, or running one product.
  typedef enum logic {
    FBSM_IDLE = 1'b0,
    FBSM_RUN  = 1'b1
  } fbsm_state_e;

endpackage
