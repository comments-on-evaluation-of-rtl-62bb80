// cm_pkg: shared constants and helper functions of the polynomial-encoding
// complex multiplier.
//
// A complex number with N-bit real and imaginary parts is split into 2^M digits
// per part, each DW = N / 2^M bits wide, and written as a polynomial of degree
// L - 1 (L = 2^(M+1)) in x = j. Coefficient 2t carries real digit 2^M-1-t,
// coefficient 2t+1 the imaginary digit of the same rank, each scaled by
// 2^((2^M-1-t)*DW) and negated for odd t, so that x^(2t) = (-1)^t cancels the
// sign again. For M = 2 this is exactly the eight-coefficient encoding
// a0 = 2^(3n/4)R3, a1 = 2^(3n/4)I3, a2 = -2^(n/2)R2, ... a7 = -I0 of the
// method; the extension to other M follows the same pattern and is this
// design's generalisation. The functions below give the position-dependent
// sign, weight exponent and digit rank, all elaboration-time constants.
package cm_pkg;

  // Number of polynomial coefficients for a given M.
  function automatic int num_coef(input int m);
    return 2 ** (m + 1);
  endfunction

  // Digit width for an N-bit part split 2^M ways.
  function automatic int digit_width(input int n, input int m);
    return n / (2 ** m);
  endfunction

  // Rank (0 = least significant) of the digit held by coefficient i.
  function automatic int coef_rank(input int i, input int m);
    return (2 ** m) - 1 - (i / 2);
  endfunction

  // 1 when coefficient i is negated.
  function automatic logic coef_neg(input int i);
    return logic'((i / 2) % 2);
  endfunction

  // Power-of-two weight exponent of coefficient i.
  function automatic int coef_shift(input int i, input int n, input int m);
    return coef_rank(i, m) * digit_width(n, m);
  endfunction

endpackage
