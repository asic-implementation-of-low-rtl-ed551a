// aefbc_pkg - shared types of the folded binary comparator.
//
// The pre-computation unit walks the operands one digit at a time, most
// significant digit first. Its sequencer has three states: waiting for a
// start (IDLE), moving one bit per clock from the input buffer into the
// digit buffer (SHIFT), and testing the filled digit for equality (CHECK).
// The state encoding is this design's own choice.
package aefbc_pkg;

  typedef enum logic [1:0] {
    ST_IDLE  = 2'd0,
    ST_SHIFT = 2'd1,
    ST_CHECK = 2'd2
  } pcu_state_t;

  // Width of a counter that can hold the values 0 .. n-1 (at least one bit).
  function automatic int unsigned cnt_width(input int unsigned n);
    return (n <= 2) ? 1 : $clog2(n);
  endfunction

endpackage
