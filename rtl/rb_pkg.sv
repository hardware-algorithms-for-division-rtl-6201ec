// rb_pkg: shared types and helpers for redundant binary (signed-digit, radix 2)
// arithmetic with the digit set {-1, 0, 1}.
//
// A digit is held in the two-rail form {p, n} with value p - n:
//   {0,0} = 0, {1,0} = +1, {0,1} = -1.  {1,1} is never produced by this design.
// With this encoding a whole redundant binary number splits into two plain
// binary vectors, the positive digits Y+ and the negative digits Y-, whose
// difference is the number's value. That is the form the final converter uses.
package rb_pkg;

  typedef struct packed {
    logic p;  // digit is +1
    logic n;  // digit is -1
  } sd_t;

  localparam sd_t SD_ZERO = '{p: 1'b0, n: 1'b0};
  localparam sd_t SD_POS  = '{p: 1'b1, n: 1'b0};
  localparam sd_t SD_NEG  = '{p: 1'b0, n: 1'b1};

  // Digit from a binary bit (0 or +1).
  function automatic sd_t sd_from_bit(input logic b);
    return '{p: b, n: 1'b0};
  endfunction

  // Product of two digits, again a digit.
  function automatic sd_t sd_mul(input sd_t a, input sd_t b);
    sd_t r;
    r.p = (a.p & b.p) | (a.n & b.n);
    r.n = (a.p & b.n) | (a.n & b.p);
    return r;
  endfunction

  // Negation swaps the rails.
  function automatic sd_t sd_neg(input sd_t a);
    return '{p: a.n, n: a.p};
  endfunction

  // Signed value of a digit, for folding a few digits into one.
  function automatic logic signed [3:0] sd_val(input sd_t a);
    return 4'(signed'({1'b0, a.p})) - 4'(signed'({1'b0, a.n}));
  endfunction

  // Digit from a small signed value known to lie in {-1, 0, 1}.
  function automatic sd_t sd_from_val(input logic signed [3:0] v);
    return '{p: (v > 0), n: (v < 0)};
  endfunction

endpackage
