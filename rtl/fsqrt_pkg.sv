// fsqrt_pkg: shared types and latency formulas of the non-restoring
// floating-point square-root cores.
//
// An IEEE-754 operand is described by two widths: EXP_W exponent bits and
// MAN_W stored fraction bits (n in the formulas below). The true mantissa
// has n+1 bits once the hidden one is added. The cores pad it to a 2(n+1)-bit
// radicand, so the integer root has n+1 bits and no precision is lost.
//
// The latency functions return clock cycles from the cycle an operand is
// accepted to the cycle its result is valid:
//   resource optimised:    2(n+1) + 1
//   performance optimised: 2(n+1) + 1 + (n+1)*Np   when n+1 is odd
//                          2(n+1)     +  n   *Np   when n+1 is even
// where Np is the number of extra pipelining registers placed between two
// unrolled iterations. These are the latency formulas the design follows;
// how the stages are arranged to meet them is described in nr_sqrt_pipe.
package fsqrt_pkg;

  // Operand classes seen by the exponent unit.
  typedef enum logic [2:0] {
    FP_FINITE  = 3'd0,  // positive normal or subnormal: goes through the root
    FP_ZERO    = 3'd1,  // +0 or -0: result is the operand itself
    FP_INF     = 3'd2,  // +infinity: result is +infinity
    FP_NAN     = 3'd3,  // any NaN input: result is the quiet NaN
    FP_NEGATIVE = 3'd4  // negative non-zero (including -inf): quiet NaN
  } fp_class_e;

  // Phases of the resource-optimised loop.
  typedef enum logic [1:0] {
    ITER_IDLE   = 2'd0,  // waiting for an operand
    ITER_SELECT = 2'd1,  // decide the quotient bit, update F and Q
    ITER_UPDATE = 2'd2   // update the partial remainder R
  } iter_state_e;

  function automatic int unsigned resource_latency(int unsigned man_w);
    return 2 * (man_w + 1) + 1;
  endfunction

  // Extra pipelining registers are inserted after this many iterations.
  function automatic int unsigned pipe_boundaries(int unsigned qw);
    return (qw % 2 == 1) ? qw : qw - 1;
  endfunction

  function automatic int unsigned pipe_latency(int unsigned man_w, int unsigned np);
    int unsigned qw;
    qw = man_w + 1;
    return 2 * qw + (qw % 2) + pipe_boundaries(qw) * np;
  endfunction

endpackage
