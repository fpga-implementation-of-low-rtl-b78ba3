// sqrt_pkg: shared types and helpers of the low-area square root calculator.
//
// The calculator takes an N-bit unsigned radicand and produces its M = N/2
// bit integer square root, one root bit per clock cycle, with a single
// shared remainder/root datapath. This package holds what several modules
// need: the sequencer state type and the width of the partial remainder.
package sqrt_pkg;

  // Sequencer state: idle and waiting for a radicand, or iterating.
  typedef enum logic {
    ST_IDLE = 1'b0,
    ST_RUN  = 1'b1
  } sqrt_state_t;

  // The partial remainder never exceeds twice the partial root, so for an
  // M-bit root it fits in M+1 bits.
  function automatic int unsigned rem_width(int unsigned m);
    return m + 1;
  endfunction

endpackage
