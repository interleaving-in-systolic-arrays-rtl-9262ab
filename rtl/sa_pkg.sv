// sa_pkg: shared constants, types and helper functions for the interleaved
// systolic arrays in this directory.
//
// Interleaving rule: a processing element whose internal (or external) loop
// takes T_LOOP cycles and whose slowest block accepts a new input every K
// cycles can hold N = T_LOOP / K independent operations in flight. When K
// does not divide T_LOOP, R = T_LOOP % K idle "stall" cycles are inserted
// after every set of N inputs so that the next set meets the values coming
// back around the loop.
package sa_pkg;

  // Number of operations that can be interleaved in one loop.
  function automatic int unsigned n_interleave(int unsigned t_loop, int unsigned k);
    return t_loop / k;
  endfunction

  // Stall cycles inserted after each set of interleaved inputs.
  function automatic int unsigned n_stalls(int unsigned t_loop, int unsigned k);
    return t_loop % k;
  endfunction

  // Feedback delay needed to interleave n operations (paper relation
  // T_fb = n*K - T_ff).
  function automatic int unsigned t_fb_for(int unsigned n, int unsigned k, int unsigned t_ff);
    return n * k - t_ff;
  endfunction

  // Control tag that travels with an operand through a systolic array.
  //   valid : the operand slot carries data (0 = stall/bubble)
  //   acc   : 1 = add to the value coming round the loop, 0 = first step,
  //           the loop input is replaced by zero (the "ctrl" signal)
  //   last  : this is the final step of the operation, the result is complete
  typedef struct packed {
    logic valid;
    logic acc;
    logic last;
  } op_tag_t;

endpackage
