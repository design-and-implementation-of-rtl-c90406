// Shared types and constants of the tree-like radix-4 multiplier.
//
// A radix-4 digit of the recoded multiplier takes one of the values
// -2, -1, 0, +1, +2. It is carried as three select lines: `one` picks the
// multiplicand, `two` picks the multiplicand shifted left by one bit, and
// `neg` makes the add/subtract cells subtract instead of add. At most one of
// `one` and `two` is high, and `neg` is low whenever the digit is zero. This
// encoding is a choice of this design; the radix-4 rule itself is the usual
// one, digit = -2*x[2i+1] + x[2i] + x[2i-1].
package tree_mult_pkg;

  // Default operand width: the 16 x 16-bit multiplier.
  localparam int unsigned DEFAULT_N = 16;

  typedef struct packed {
    logic neg;  // subtract the selected multiple
    logic two;  // magnitude 2: multiplicand shifted left by one
    logic one;  // magnitude 1: multiplicand as it is
  } r4_digit_t;

  // Integer value of a digit, for checks and assertions.
  function automatic int digit_value(r4_digit_t d);
    int mag;
    mag = d.two ? 2 : (d.one ? 1 : 0);
    return d.neg ? -mag : mag;
  endfunction

endpackage
