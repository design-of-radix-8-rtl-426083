// Shared types and elaboration-time helpers of the radix-8 Booth encoded
// modulo 2^n+1 multiplier.
//
// booth_digit_t carries one radix-8 Booth digit d in {-4..+4} in the form the
// partial product generator consumes: a sign bit and a one-hot magnitude
// (1X, 2X, 3X, 4X). A zero digit has every magnitude bit clear and neg = 0.
//
// num_digits(n) gives the number of radix-8 digits needed to recode an
// (n+1)-bit operand in [0, 2^n]: the operand is zero-extended by one bit so
// that its top digit stays non-negative, hence ceil((n+2)/3).
package modmul_pkg;

  typedef struct packed {
    logic neg;   // digit is negative
    logic m4;    // |d| = 4
    logic m3;    // |d| = 3 (hard multiple)
    logic m2;    // |d| = 2
    logic m1;    // |d| = 1
  } booth_digit_t;

  function automatic int num_digits(input int n);
    return (n + 2 + 2) / 3;
  endfunction

endpackage
