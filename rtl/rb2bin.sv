// rb2bin: redundant binary to binary converter.
//
// A redundant binary number whose value is known to be nonnegative equals
// Y+ - Y-, where Y+ holds its +1 digits and Y- its -1 digits as plain binary
// words. With the two-rail digit encoding of rb_pkg those two words are the
// inputs directly, and the conversion is one W-bit binary subtraction.
// The document allows a ripple-carry or a carry-look-ahead adder here; this
// design writes the subtraction as an operator and leaves the adder structure
// to synthesis. Purely combinational.
module rb2bin #(
  parameter int unsigned W = 9   // digits in the number
) (
  input  logic [W-1:0] pos,  // bit k set: digit of weight 2^k is +1
  input  logic [W-1:0] neg,  // bit k set: digit of weight 2^k is -1
  output logic [W-1:0] bin   // pos - neg, as an unsigned binary number
);

  assign bin = pos - neg;

endmodule
