// digit_select: quotient / square-root digit selection cell.
//
// Returns the sign, as a digit in {-1, 0, 1}, of the three-digit redundant
// binary number [d0 d1 d2] (d0 most significant). In a signed-digit number
// the sign is the sign of the leading nonzero digit, so the cell is a
// three-input priority choice and needs no addition.
//
// Both the divider (rule on [r0.r1 r2] of R_j) and the square rooter (rule on
// the top three digits of R_j) use this same cell; the selection rule follows
// the algorithms, the priority-mux realisation is this design's own choice.
// Purely combinational.
module digit_select
  import rb_pkg::*;
(
  input  sd_t d0,   // most significant of the three remainder digits
  input  sd_t d1,
  input  sd_t d2,   // least significant of the three
  output sd_t q     // selected digit: sign of [d0 d1 d2]
);

  always_comb begin
    if (d0.p | d0.n)      q = d0;
    else if (d1.p | d1.n) q = d1;
    else                  q = d2;
  end

endmodule
