// rb_sqrt: combinational n-bit square rooter whose partial remainders are kept
// in redundant binary (signed-digit) form.
//
// The operand is a binary fraction x = [.x1 .. xN] with 1/4 <= X < 1 (bit N-i
// of the vector holds the digit of weight 2^-i). The array evaluates
//     R_{j+1} = R_j - q_j * (2 Q_{j-1} + q_j),   q_j = p_j * 2^-j,
//     Q_j     = Q_{j-1} + q_j,
// starting from R_1 = X, p_1 = 1 (first row: R_2 = X - 1/4). For j >= 2 the
// root digit p_j in {-1,0,1} is the sign of the three leading digits
// [r_{j-2} r_{j-1} r_j] of R_j (digit_select). R_j occupies the digit
// positions of weight 2^-(j-2) .. 2^-2j, so each row is one digit wider than
// the last, and the operand digits of weight 2^-(2j+1) and 2^-(2j+2) join the
// remainder below row j.
//
// The subtrahend needs no multiplier: shifted by 2^-j, the digits of
// 2 Q_{j-1} + q_j are p_1 .. p_{j-1} (weights 2^-j .. 2^-(2j-2)), a zero, and
// p_j at 2^-2j. Each rb_addsub_cell receives one of those digits and the
// row's p_j and forms x - p_j * digit without carry propagation, so a row has
// constant delay and the array is O(N) deep. The RB root [.p1 .. pN] is output
// as its positive and negative digit vectors and converted to binary by
// rb2bin. The result has |Q - sqrt(X)| < 2^-N; root carries one integer bit
// (root[N]) because a root rounded up from just below 1 can equal 1.0.
//
// Follows the document: the recursion, the three-digit selection, the first
// row fixed to X - 1/4, the digit span of R_j, the final conversion.
// This design's own choices: the two-rail digit encoding and carry-free
// addition rule (rb_addsub_cell), the extra integer bit of root, and how a
// row's leading digits are folded. The carry-free sum of row j can reach the
// weights 2^-(j-3) and 2^-(j-2); since |R_{j+1}| stays below 2^-(j-2), those
// digits together with the one of weight 2^-(j-1) add to a value in {-1,0,1},
// which becomes the leading digit r_{j-1} of R_{j+1}.
// Pruning (PRUNE = 1, default): as the document notes, for j > 3N/4 the
// low-order digits of R_j cannot affect the root. A digit of R_{j+1} depends
// on three digits of R_j, so row j keeps its cells only down to weight
// 2^-(3N-2j). The root digits are identical to those of the full array
// (PRUNE = 0).
// Timing: purely combinational, no clock.
module rb_sqrt
  import rb_pkg::*;
#(
  parameter int          N = 8,  // operand and root width in bits (N >= 3)
  parameter bit          PRUNE = 1'b1  // leave out cells that cannot affect Q
) (
  input  logic [N-1:0] x,      // operand fraction bits, x[N-1] = x1
  output logic [N-1:0] p_pos,  // +1 digits of [.p1..pN], p_pos[N-1] = p1
  output logic [N-1:0] p_neg,  // -1 digits of [.p1..pN]
  output logic [N:0]   root    // binary root, root[N] has weight 1
);

  // Digit arrays cover the weights 2^1 .. 2^-2N; position i (weight 2^-i)
  // sits at index i + OFF.
  localparam int OFF = 1;
  localparam int TOP = 2 * N + OFF;

  // Row j (1 .. N-1) forms R_{j+1} from R_j.
  for (genvar j = 1; j < N; j++) begin : g_row
    // Pruning: digit i of R_{j+1} depends on digits i .. i+2 of R_j, and p_N
    // needs digits N-2 .. N of R_N, so only the digits of R_j down to weight
    // 2^-(3N-2j) can reach a root digit. For j > 3N/4 that cuts the row short.
    localparam int LIVE = 3 * N - 2 * j;
    localparam int IMAX = (PRUNE && LIVE < 2 * j) ? LIVE : 2 * j;

    sd_t  rin [0:TOP];   // R_j
    sd_t  rn  [0:TOP];   // R_{j+1}
    sd_t  pj;            // root digit p_j used by this row
    // Cells at positions j-2 .. IMAX, indexed by position + OFF.
    sd_t  z  [j-2+OFF:IMAX+OFF];
    sd_t  c  [j-1+OFF:IMAX+1+OFF];  // c[i+1]: carry out of cell i+1 into cell i
    logic nn [j-2+OFF:IMAX+1+OFF];  // nn[i+1]: pair of cell i+1 has no -1
    sd_t  c_top;                    // carry out of the leading cell

    if (j == 1) begin : g_first
      // Step 1: the operand needs no conversion. Step 2: p_1 = 1.
      always_comb begin
        for (int i = -OFF; i <= 2 * N; i++)
          rin[i+OFF] = (i >= 1 && i <= N) ? sd_from_bit(x[N-i]) : SD_ZERO;
      end
      assign pj = SD_POS;
    end else begin : g_next
      // Step 3: p_j is the sign of [r_{j-2} r_{j-1} r_j] of R_j.
      assign rin = g_row[j-1].rn;
      digit_select u_sel (
        .d0(rin[j-2+OFF]), .d1(rin[j-1+OFF]), .d2(rin[j+OFF]), .q(pj)
      );
    end

    // Below the last cell the array behaves as if all digits were zero.
    assign c[IMAX+1+OFF]  = SD_ZERO;
    assign nn[IMAX+1+OFF] = 1'b1;

    for (genvar i = j - 2; i <= IMAX; i++) begin : g_cell
      sd_t b;      // digit of 2Q_{j-1} + q_j at this position, before * p_j
      sd_t c_out;
      if (i >= j && i <= 2 * j - 2) begin : g_q
        assign b = g_row[i-j+1].pj;        // p_{i-j+1}
      end else if (i == 2 * j) begin : g_pj
        assign b = pj;                     // gives -p_j * p_j
      end else begin : g_zero
        assign b = SD_ZERO;
      end
      rb_addsub_cell u_cell (
        .x(rin[i+OFF]), .y(b), .m(pj),
        .lo_nonneg_i(nn[i+1+OFF]), .c_i(c[i+1+OFF]),
        .nonneg_o(nn[i+OFF]), .c_o(c_out), .z(z[i+OFF])
      );
      if (i == j - 2) begin : g_top
        assign c_top = c_out;
      end else begin : g_mid
        assign c[i+OFF] = c_out;
      end
    end

    // Assemble R_{j+1}: zeros above, the folded leading digit, the row's
    // sums, then the operand digits not yet reached; digits of a pruned row
    // past its last cell are not computed and read as zero.
    always_comb begin
      for (int i = -OFF; i <= 2 * N; i++) begin
        if (i < j - 1)       rn[i+OFF] = SD_ZERO;
        else if (i == j - 1) rn[i+OFF] = sd_from_val(4'sd4 * sd_val(c_top)
                                         + 4'sd2 * sd_val(z[j-2+OFF])
                                         + sd_val(z[j-1+OFF]));
        else if (i <= IMAX)  rn[i+OFF] = z[i+OFF];
        else if (i <= 2 * j) rn[i+OFF] = SD_ZERO;
        else                 rn[i+OFF] = rin[i+OFF];
      end
    end

    assign p_pos[N-j] = pj.p;
    assign p_neg[N-j] = pj.n;
  end

  // Last root digit p_N, from R_N.
  sd_t p_last;
  digit_select u_sel_last (
    .d0(g_row[N-1].rn[N-2+OFF]), .d1(g_row[N-1].rn[N-1+OFF]),
    .d2(g_row[N-1].rn[N+OFF]), .q(p_last)
  );
  assign p_pos[0] = p_last.p;
  assign p_neg[0] = p_last.n;

  // Step 4: RB root to binary.
  rb2bin #(.W(N + 1)) u_conv (
    .pos({1'b0, p_pos}), .neg({1'b0, p_neg}), .bin(root)
  );

endmodule
