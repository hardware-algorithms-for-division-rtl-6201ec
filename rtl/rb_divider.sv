// rb_divider: combinational n-bit fraction divider whose partial remainders
// are kept in redundant binary (signed-digit) form.
//
// Operands are normalized binary fractions, 1/2 <= X < 1 and 1/2 <= Y < 1,
// given as x = [.x1 .. xN] and y = [.y1 .. yN] (bit N-i of the vector holds the
// digit of weight 2^-i). The array evaluates the recursion
//     R_{j+1} = 2 R_j - q_j * Y,     R_0 = X,  q_0 = 1 (first row: R_1 = X - Y)
// with every R_j = [r0 . r1 .. rN] in redundant binary. Row j picks q_j in
// {-1,0,1} as the sign of the three leading digits [r0 . r1 r2] of R_j
// (digit_select) and forms 2R_j - q_j*Y with one rb_addsub_cell per digit, so
// each row has constant delay and the whole array is O(N) deep. The RB
// quotient [q0 . q1 .. qN] is output as its positive and negative digit
// vectors and converted to binary by rb2bin (Q = Q+ - Q-).
// Result: q holds 1 integer bit and N fraction bits (bit N = q0) and
// |Q - X/Y| < 2^-N. It is either the truncated or the rounded-up quotient;
// which one depends on the digits the array selects.
//
// Follows the document: the recursion, the three-digit selection rule, the
// first row fixed to subtraction, the final Q+ - Q- conversion.
// This design's own choices: the two-rail digit encoding, the carry-free
// addition rule inside rb_addsub_cell, and how the row's leading digits are
// folded. Shifting 2R_j moves r0 to weight 2^1, and the carry-free sum may
// produce a further carry into weight 2^2. Because |R_{j+1}| < Y < 1, the
// digits of weight 2^2, 2^1 and 2^0 always add up to a value in {-1,0,1}, which
// becomes the new r0.
// Pruning (PRUNE = 1, default): the document notes that low-order remainder
// digits of the later rows cannot affect the quotient and need not be
// computed. With this design's addition rule a digit of R_{j+1} depends on
// three digits of R_j, so row j keeps only the cells for digits up to
// 2 + 3(N-j) and drops the rest (rows past about 2N/3 are shortened). The
// quotient digits are identical to those of the full array (PRUNE = 0).
// Timing: purely combinational, no clock.
module rb_divider
  import rb_pkg::*;
#(
  parameter int          N = 8,  // operand width in bits (N >= 3)
  parameter bit          PRUNE = 1'b1  // leave out cells that cannot affect Q
) (
  input  logic [N-1:0] x,      // dividend fraction bits, x[N-1] = x1
  input  logic [N-1:0] y,      // divisor fraction bits,  y[N-1] = y1
  output logic [N:0]   q_pos,  // +1 digits of [q0.q1..qN], q_pos[N] = q0
  output logic [N:0]   q_neg,  // -1 digits of [q0.q1..qN]
  output logic [N:0]   q       // binary quotient, q[N] has weight 1
);

  // Row j forms R_{j+1} from R_j (row 0 without the doubling).
  // rin[i] / rn[i]: digit of weight 2^-i of R_j / R_{j+1}.
  // Cell k of a row works on the digit of weight 2^-(k-1), k = 0 .. KMAX.
  for (genvar j = 0; j < N; j++) begin : g_row
    // Pruning: digit i of R_{j+1} depends on digits i+1 .. i+3 of R_j, and
    // q_N needs digits 0..2 of R_N, so only digits 0 .. 2+3(N-j) of R_j can
    // reach a quotient digit. Cells past that point are left out.
    localparam int LIVE = 2 + 3 * (N - j);
    localparam int KMAX = (PRUNE && j > 0 && LIVE < N + 1) ? LIVE : N + 1;

    sd_t  rin [0:N];
    sd_t  rn  [0:N];
    sd_t  qj;              // quotient digit q_j used by this row
    sd_t  a  [0:KMAX];     // partial remainder digits, shifted for 2R_j
    sd_t  d  [0:KMAX];     // divisor digits
    sd_t  z  [0:KMAX];     // sum digits
    sd_t  c  [1:KMAX+1];   // c[k+1]: carry out of cell k+1 into cell k
    logic nn [0:KMAX+1];   // nn[k+1]: pair of cell k+1 has no negative digit
    sd_t  c_top;           // carry out of cell 0 (weight 2^2 for j > 0)

    if (j == 0) begin : g_first
      // Step 1: the dividend needs no conversion. Step 2: q0 = 1.
      always_comb begin
        rin[0] = SD_ZERO;
        for (int i = 1; i <= N; i++) rin[i] = sd_from_bit(x[N-i]);
      end
      assign qj = SD_POS;
    end else begin : g_next
      // Step 3: q_j is the sign of [r0 . r1 r2] of R_j.
      assign rin = g_row[j-1].rn;
      digit_select u_sel (.d0(rin[0]), .d1(rin[1]), .d2(rin[2]), .q(qj));
    end

    always_comb begin
      for (int k = 0; k <= KMAX; k++) begin
        if (j == 0) a[k] = (k == 0) ? SD_ZERO : rin[k-1];
        else        a[k] = (k <= N) ? rin[k] : SD_ZERO;
        d[k] = (k >= 2) ? sd_from_bit(y[N-(k-1)]) : SD_ZERO;
      end
    end

    // Below the last cell the array behaves as if all digits were zero.
    assign c[KMAX+1]  = SD_ZERO;
    assign nn[KMAX+1] = 1'b1;

    for (genvar k = 0; k <= KMAX; k++) begin : g_cell
      sd_t c_out;
      rb_addsub_cell u_cell (
        .x(a[k]), .y(d[k]), .m(qj),
        .lo_nonneg_i(nn[k+1]), .c_i(c[k+1]),
        .nonneg_o(nn[k]), .c_o(c_out), .z(z[k])
      );
      if (k == 0) begin : g_top
        assign c_top = c_out;
      end else begin : g_mid
        assign c[k] = c_out;
      end
    end

    // Fold the digits of weight 2^2, 2^1, 2^0 into the new r0; digits past
    // the last cell are not computed and read as zero.
    always_comb begin
      rn[0] = sd_from_val(4'sd4 * sd_val(c_top) + 4'sd2 * sd_val(z[0])
                          + sd_val(z[1]));
      for (int i = 1; i <= N; i++) rn[i] = (i + 1 <= KMAX) ? z[i+1] : SD_ZERO;
    end

    assign q_pos[N-j] = qj.p;
    assign q_neg[N-j] = qj.n;
  end

  // Last quotient digit q_N, from R_N.
  sd_t q_last;
  digit_select u_sel_last (
    .d0(g_row[N-1].rn[0]), .d1(g_row[N-1].rn[1]), .d2(g_row[N-1].rn[2]),
    .q(q_last)
  );
  assign q_pos[0] = q_last.p;
  assign q_neg[0] = q_last.n;

  // Step 4: RB quotient to binary.
  rb2bin #(.W(N + 1)) u_conv (.pos(q_pos), .neg(q_neg), .bin(q));

endmodule
