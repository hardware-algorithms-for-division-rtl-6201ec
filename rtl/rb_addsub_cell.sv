// rb_addsub_cell: one digit position of a carry-free redundant binary
// add/subtract, computing x + (-m * y) digit by digit.
//
// The addend -m*y is first formed from the digit y and the broadcast
// multiplier digit m (the quotient or root digit of the row), so the same cell
// adds, subtracts or passes x through. The pair (x, -m*y) is then split into an
// intermediate carry c (to the next more significant position) and an
// intermediate sum s, using a one-bit look at the next less significant pair
// ("both digits of that pair are nonnegative", lo_nonneg_i):
//
//   pair (x, a)          lo_nonneg=1      lo_nonneg=0
//   (1,1)                c=1,  s=0        c=1,  s=0
//   (1,0),(0,1)          c=1,  s=-1       c=0,  s=1
//   (0,0),(1,-1),(-1,1)  c=0,  s=0        c=0,  s=0
//   (0,-1),(-1,0)        c=0,  s=-1       c=-1, s=1
//   (-1,-1)              c=-1, s=0        c=-1, s=0
//
// The result digit is z = s + c_in, where c_in is the intermediate carry of the
// less significant neighbour. The rule guarantees z stays in {-1,0,1}, so a
// carry never travels further than one position and the delay is constant
// regardless of word length.
//
// The document states only that such a cell exists and adds in constant time;
// this particular rule set is the standard signed-digit addition rule and is
// this design's choice. Purely combinational.
module rb_addsub_cell
  import rb_pkg::*;
(
  input  sd_t  x,            // minuend digit (partial remainder)
  input  sd_t  y,            // digit of the operand (divisor bit or root digit)
  input  sd_t  m,            // multiplier digit: the cell computes x - m*y
  input  logic lo_nonneg_i,  // less significant pair has no negative digit
  input  sd_t  c_i,          // intermediate carry from the less significant cell
  output logic nonneg_o,     // this pair has no negative digit
  output sd_t  c_o,          // intermediate carry to the more significant cell
  output sd_t  z             // result digit
);

  sd_t a;  // addend digit -m*y
  sd_t s;  // intermediate sum

  always_comb begin
    a = sd_neg(sd_mul(m, y));
    nonneg_o = ~x.n & ~a.n;
    c_o = SD_ZERO;
    s   = SD_ZERO;
    unique case ({x, a})
      {SD_POS, SD_POS}: c_o = SD_POS;
      {SD_NEG, SD_NEG}: c_o = SD_NEG;
      {SD_POS, SD_ZERO},
      {SD_ZERO, SD_POS}: begin
        if (lo_nonneg_i) begin c_o = SD_POS;  s = SD_NEG; end
        else             begin c_o = SD_ZERO; s = SD_POS; end
      end
      {SD_NEG, SD_ZERO},
      {SD_ZERO, SD_NEG}: begin
        if (lo_nonneg_i) begin c_o = SD_ZERO; s = SD_NEG; end
        else             begin c_o = SD_NEG;  s = SD_POS; end
      end
      default: ;  // (0,0), (1,-1), (-1,1): c = 0, s = 0
    endcase
    // z = s + c_i; the rules above keep the sum within one digit.
    z = sd_from_val(sd_val(s) + sd_val(c_i));
  end

endmodule
