// rb_divsqrt_top: the redundant binary array divider and the redundant binary
// array square rooter, side by side.
//
// The two arrays share the same cells (digit_select, rb_addsub_cell, rb2bin)
// but are independent circuits with their own operands and results; nothing
// is multiplexed between them. Each output is a combinational function of its
// inputs. Alongside each binary result the redundant binary digits chosen by
// the array are brought out (positive and negative digit vectors), which is
// the form the result has before its final conversion.
//
//   divider:     1/2 <= X, Y < 1,  |Q - X/Y| < 2^-N,      Q has 1+N bits
//   square root: 1/4 <= X < 1,     |Q - sqrt(X)| < 2^-N,  Q has 1+N bits
//
// Placing both on one top is this design's choice; the document presents
// them as two separate circuits. Timing: purely combinational, no clock.
module rb_divsqrt_top #(
  parameter int N = 8   // operand width of both units, in bits
) (
  // divider
  input  logic [N-1:0] div_x,       // dividend [.x1..xN]
  input  logic [N-1:0] div_y,       // divisor  [.y1..yN]
  output logic [N:0]   div_q_pos,   // +1 digits of RB quotient [q0.q1..qN]
  output logic [N:0]   div_q_neg,   // -1 digits of RB quotient
  output logic [N:0]   div_q,       // binary quotient, div_q[N] has weight 1
  // square rooter
  input  logic [N-1:0] sqrt_x,      // operand [.x1..xN]
  output logic [N-1:0] sqrt_p_pos,  // +1 digits of RB root [.p1..pN]
  output logic [N-1:0] sqrt_p_neg,  // -1 digits of RB root
  output logic [N:0]   sqrt_root    // binary root, sqrt_root[N] has weight 1
);

  rb_divider #(.N(N)) u_div (
    .x(div_x), .y(div_y), .q_pos(div_q_pos), .q_neg(div_q_neg), .q(div_q)
  );

  rb_sqrt #(.N(N)) u_sqrt (
    .x(sqrt_x), .p_pos(sqrt_p_pos), .p_neg(sqrt_p_neg), .root(sqrt_root)
  );

endmodule
