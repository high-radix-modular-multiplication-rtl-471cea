// mm_pkg: types and helpers shared by the high-radix Montgomery multiplier.
//
// Numbers that are not plain binary are kept in borrow-save form, i.e. radix-2
// signed digits d_j = p_j - n_j in {-1,0,1}, stored as a positive bit vector P
// and a negative bit vector N with value P - N. Multiplier and quotient digits
// of radix 2^K are carried as K/2 radix-4 digits from {-2,-1,0,1,2}; r4_t is
// one such digit in sign/magnitude form (mag is 0, 1 or 2), which is exactly
// what a partial-product selector needs (choose 0, X or 2X, then the sign).
package mm_pkg;

  typedef struct packed {
    logic       neg;  // digit is negative
    logic [1:0] mag;  // magnitude: 0, 1 or 2 (3 never occurs)
  } r4_t;

  // Build a radix-4 digit from a small integer in [-2, 2].
  function automatic r4_t r4_from_int(input int v);
    r4_t d;
    d.neg = (v < 0);
    d.mag = (v < 0) ? 2'(-v) : 2'(v);
    if (d.mag == 2'd0) d.neg = 1'b0;
    return d;
  endfunction

  // Integer value of a radix-4 digit.
  function automatic int r4_value(input r4_t d);
    return d.neg ? -int'(d.mag) : int'(d.mag);
  endfunction

endpackage
