// booth_pkg: types and helpers shared by the radix-4 Booth multiplier.
//
// A radix-4 Booth digit f = -2*a(2i+1) + a(2i) + a(2i-1) lies in {-2,-1,0,+1,+2}. The
// hardware never forms the digit as a number; it carries three select lines instead:
//   neg : the digit is negative (the row is the one's complement of |f|*b)
//   one : the digit is non-zero (the row is not all zero)
//   two : |f| = 2 (the row uses b shifted left by one instead of b)
// These follow the three output columns of the recoding truth table. The width helper
// gives the number of F blocks for an N-bit operand that has been widened to N+1 bits.
package booth_pkg;

  typedef struct packed {
    logic neg;   // F bar: digit negative
    logic one;   // F^1 : digit non-zero
    logic two;   // F^2 : digit is +2 or -2
  } booth_sel_t;

  // Number of 3-bit F blocks (and partial-product rows) for an N-bit operand: the
  // operand is widened to N+1 bits, so N/2+1 digits are needed (17 for N = 32).
  function automatic int unsigned num_groups(input int unsigned n);
    return n / 2 + 1;
  endfunction

endpackage
