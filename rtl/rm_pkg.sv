// Shared definitions of the recursive parallel multiplier.
//
// The multiplier is built from G-bit full-multiplier cells, grouped into
// Q x Q P_q-multipliers, which are combined four at a time by pseudo-adders
// (carry-save trees) until one N x N pseudo-multiplier remains; a
// carry-lookahead "special adder" turns its two outputs into the product.
// The defaults below are N = 64, Q = 8, G = 2: an 8 x 8 grid of 8-bit
// P_q-multipliers (three recursion levels), each a 4 x 4 grid of 2-bit cells.
package rm_pkg;

  // Precision mode, the "specification variable" of the whole multiplier.
  //   MODE_DOUBLE : one N x N multiplication.
  //   MODE_QUAD   : four independent (N/2) x (N/2) multiplications, one per
  //                 top-level quadrant.
  typedef enum logic {
    MODE_DOUBLE = 1'b0,
    MODE_QUAD   = 1'b1
  } prec_mode_e;

  // Default sizes.
  localparam int unsigned DEF_N = 64;  // factor width
  localparam int unsigned DEF_Q = 8;   // P_q-multiplier width
  localparam int unsigned DEF_G = 2;   // full-multiplier cell digit width

  // Pipeline latencies in clock cycles (all zero when pipe = 0).
  // P_q cell array: one register stage per cell row. Table form: none.
  function automatic int unsigned pq_latency(input int unsigned q, input int unsigned g,
                                             input bit pipe, input bit rom);
    return (pipe && !rom) ? q / g : 0;
  endfunction

  // Pseudo-adder and two's complement correction: one stage per CSA level.
  function automatic int unsigned csa3_latency(input bit pipe);
    return pipe ? 3 : 0;
  endfunction

  // B_f pseudo-multiplier of width w: P_q latency plus one pseudo-adder per
  // recursion level.
  function automatic int unsigned tree_latency(input int unsigned w, input int unsigned q,
                                               input int unsigned g, input bit pipe,
                                               input bit rom);
    return pq_latency(q, g, pipe, rom) + csa3_latency(pipe) * $clog2(w / q);
  endfunction

  // Brent-Kung special adder of width w: one stage per prefix level.
  function automatic int unsigned sa_latency(input int unsigned w, input bit pipe);
    return pipe ? 2 * $clog2(w) - 1 : 0;
  endfunction

  // True when x is a power of two (x > 0).
  function automatic bit is_pow2(input int unsigned x);
    return (x != 0) && ((x & (x - 1)) == 0);
  endfunction

endpackage
