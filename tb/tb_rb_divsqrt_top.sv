// tb_rb_divsqrt_top: end-to-end test of the divider and square rooter at the
// top's default width (no parameter override).
//
// Every normalized dividend/divisor pair and every square-root operand in
// [1/4, 1) is applied, the two units side by side in the same steps. Results
// are checked with integer arithmetic done here:
//   divider:     |Q*Y - X| < Y * 2^-N  (Q is X/Y rounded down or up)
//   square root: (Q'-1)^2 < X'*2^N < (Q'+1)^2  (|Q - sqrt X| < 2^-N)
// plus agreement of each binary result with its RB digit vectors, and the two
// worked examples X/Y = 0.10011101/0.11000101 -> 0.11001100 and
// sqrt(0.10001101) -> 0.10111110.
// Each row of either array either subtracts (digit +1), adds (digit -1) or only
// shifts (digit 0); the test counts how often each of the six cases was
// selected and fails if one never occurs.
module tb_rb_divsqrt_top;

  int checks = 0;
  int failures = 0;

  localparam int N = 8;   // must equal the top's default N

  logic [N-1:0] div_x, div_y, sqrt_x, sp, sn;
  logic [N:0]   qp, qn, q, root;

  rb_divsqrt_top dut (
    .div_x(div_x), .div_y(div_y), .div_q_pos(qp), .div_q_neg(qn), .div_q(q),
    .sqrt_x(sqrt_x), .sqrt_p_pos(sp), .sqrt_p_neg(sn), .sqrt_root(root)
  );

  // usage counters: [0] digit -1 (add), [1] digit 0 (shift), [2] digit +1 (subtract)
  int div_use [3];
  int sqrt_use [3];

  task automatic count(input logic [N:0] pos, input logic [N:0] neg, input int w,
                       input bit is_div);
    for (int k = 0; k < w; k++) begin
      int idx;
      idx = pos[k] ? 2 : (neg[k] ? 0 : 1);
      if (is_div) div_use[idx]++;
      else        sqrt_use[idx]++;
    end
  endtask

  initial begin : watchdog
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3; i++) begin div_use[i] = 0; sqrt_use[i] = 0; end

    div_x = 8'b1001_1101; div_y = 8'b1100_0101; sqrt_x = 8'b1000_1101;
    #1;
    checks += 2;
    if (q !== 9'b0_1100_1100)    begin failures++; $display("FAIL div example q=%b", q); end
    if (root !== 9'b0_1011_1110) begin failures++; $display("FAIL sqrt example root=%b", root); end

    for (int xi = 1 << (N - 1); xi < (1 << N); xi++)
      for (int yi = 1 << (N - 1); yi < (1 << N); yi++) begin
        longint err;
        div_x = N'(xi); div_y = N'(yi);
        sqrt_x = N'(((xi - (1 << (N - 1))) * (1 << N) + yi) % (3 << (N - 2)) + (1 << (N - 2)));
        #1;
        // divider
        err = longint'(q) * yi - (longint'(xi) << N);
        checks++;
        if (err >= longint'(yi) || -err >= longint'(yi) || (N+1)'(qp - qn) != q || (qp & qn) != '0) begin
          failures++;
          $display("FAIL div x=%h y=%h q=%h (+%b -%b)", div_x, div_y, q, qp, qn);
        end
        count(qp, qn, N + 1, 1'b1);
        // square root
        begin
          longint xs, lo, hi;
          xs = longint'(sqrt_x) << N;
          lo = (longint'(root) - 1) * (longint'(root) - 1);
          hi = (longint'(root) + 1) * (longint'(root) + 1);
          checks++;
          if (!(lo < xs && xs < hi) || (N+1)'({1'b0, sp} - {1'b0, sn}) != root
              || (sp & sn) != '0) begin
            failures++;
            $display("FAIL sqrt x=%h root=%h (+%b -%b)", sqrt_x, root, sp, sn);
          end
          count({1'b0, sp}, {1'b0, sn}, N, 1'b0);
        end
      end

    $display("divider digits:      add %0d  shift %0d  subtract %0d",
             div_use[0], div_use[1], div_use[2]);
    $display("square-root digits:  add %0d  shift %0d  subtract %0d",
             sqrt_use[0], sqrt_use[1], sqrt_use[2]);
    for (int i = 0; i < 3; i++) begin
      checks += 2;
      if (div_use[i] == 0)  begin failures++; $display("FAIL divider digit case %0d never occurred", i - 1); end
      if (sqrt_use[i] == 0) begin failures++; $display("FAIL square-root digit case %0d never occurred", i - 1); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
