// modmul_pkg: shared helpers for the digit-serial modular multipliers.
//
// Holds the digit-count function used to size operand digit loops and the
// encoding of the operation that the Z-register adder performs in a given
// cycle. Both the integer Barrett and integer Montgomery multipliers use the
// same Z-update unit, only with a different set of operations:
//   Barrett    : Z <- Z*2^w + P1, Z <- Z - P2
//   Montgomery : Z <- Z + P1,     Z <- (Z + P2) / 2^w, Z <- Z - P2
// where P1 is the result of the X-by-digit multiplier (pi1) and P2 the result
// of the quotient-by-modulus multiplier (pi2). The correction steps at the
// end of both algorithms reuse pi2 with a quotient digit of +1 or -1.
package modmul_pkg;

  // Number of DW-bit digits needed to hold an NB-bit number: ceil(NB/DW).
  function automatic int unsigned num_digits(input int unsigned nb, input int unsigned dw);
    return (nb + dw - 1) / dw;
  endfunction

  // Operation applied to the Z register in one cycle.
  typedef enum logic [2:0] {
    ZOP_HOLD    = 3'd0,  // keep Z
    ZOP_CLEAR   = 3'd1,  // Z <- 0
    ZOP_SHL_ADD = 3'd2,  // Z <- Z*2^w + P1        (Barrett, new digit)
    ZOP_ADD     = 3'd3,  // Z <- Z + P1            (Montgomery, new digit)
    ZOP_SUB     = 3'd4,  // Z <- Z - P2            (Barrett reduction, corrections)
    ZOP_ADD_SHR = 3'd5   // Z <- (Z + P2) / 2^w    (Montgomery reduction)
  } zop_e;

endpackage
