// booth16_pkg: types, sizes and helper functions shared by the radix-16
// Booth multiplier blocks.
//
// A radix-16 Booth digit d_i = -8*y(4i+3) + 4*y(4i+2) + 2*y(4i+1) + y(4i)
// + y(4i-1) lies in -8..+8. A digit is carried between blocks as a
// booth_digit_t: a one-hot select of the magnitude |d| (bit k set means
// |d| = k+1, all bits clear means |d| = 0) and the "hot one" neg bit. The
// partial product of a digit is the selected multiple of X, bitwise
// complemented when neg is set; neg is then added in the array at the
// digit's least significant position to complete the two's complement.
//
// For an unsigned N-bit multiplier there are N/4+1 digits (i = 0..N/4);
// the top digit only sees y(N-1) and is always 0 or +1. Each partial product
// is N+4 bits wide: up to 8*X needs N+3 bits, plus a sign bit.
package booth16_pkg;

  typedef struct packed {
    logic       neg;     // hot one: digit is negative, complement and add 1
    logic [7:0] onehot;  // onehot[k] selects (k+1)*X; all zero selects 0
  } booth_digit_t;

  // Number of radix-16 digits for unsigned N-bit operands.
  function automatic int unsigned num_digits(int unsigned n);
    return n / 4 + 1;
  endfunction

  // Width of one partial product (sign included).
  function automatic int unsigned pp_width(int unsigned n);
    return n + 4;
  endfunction

endpackage
