// tb_rb_table2_sizes: the divider and the square rooter at the operand widths
// n = 16, 32 and 64 (n = 8 is covered exhaustively elsewhere; at n = 128 the
// arrays take too long to build in verilator for a routine test).
//
// One rb_divsqrt_top per width gets random normalized operands plus the
// range ends. Checks, in wide integer arithmetic done here:
//   divider:     |Q'*Y' - X'*2^n| < Y'            (|Q - X/Y| < 2^-n)
//   square root: (R'-1)^2 < X'*2^n < (R'+1)^2      (|R - sqrt X| < 2^-n)
// where primes are the values scaled by 2^n, and that each binary result
// equals the value of its RB digit vectors.
module tb_rb_table2_sizes;

  int checks = 0;
  int failures = 0;

  localparam int NS [3] = '{16, 32, 64};
  localparam int MAXN = 64;
  localparam int TRIALS = 2000;

  typedef logic [MAXN-1:0] op_t;
  typedef logic [MAXN:0]   res_t;
  typedef logic signed [4*MAXN+7:0] wide_t;

  op_t  dx [3], dy [3], sx [3];
  res_t dq [3], dqp [3], dqn [3], sr [3], spp [3], spn [3];

  for (genvar g = 0; g < 3; g++) begin : g_size
    localparam int N = NS[g];
    logic [N-1:0] q_sp, q_sn;
    logic [N:0]   q_p, q_n, q_b, r_b;
    rb_divsqrt_top #(.N(N)) dut (
      .div_x(dx[g][N-1:0]), .div_y(dy[g][N-1:0]),
      .div_q_pos(q_p), .div_q_neg(q_n), .div_q(q_b),
      .sqrt_x(sx[g][N-1:0]), .sqrt_p_pos(q_sp), .sqrt_p_neg(q_sn), .sqrt_root(r_b)
    );
    assign dq[g]  = res_t'(q_b);
    assign dqp[g] = res_t'(q_p);
    assign dqn[g] = res_t'(q_n);
    assign sr[g]  = res_t'(r_b);
    assign spp[g] = res_t'(q_sp);
    assign spn[g] = res_t'(q_sn);
  end

  function automatic op_t rand_op(input int n, input int lead);
    op_t v;
    for (int k = 0; k < MAXN / 32; k++) v[32*k +: 32] = $urandom;
    v = v & ((op_t'(1) << n) - 1);
    v[n-1] = 1'b1;
    if (lead == 2 && !v[n-1]) v[n-2] = 1'b1;
    return v;
  endfunction

  task automatic check(input int g, input int n);
    wide_t xs, err, y, lo, hi;
    xs  = wide_t'(dx[g]) <<< n;
    y   = wide_t'(dy[g]);
    err = wide_t'(dq[g]) * y - xs;
    checks++;
    if (err >= y || -err >= y || dqp[g] - dqn[g] != dq[g]) begin
      failures++;
      $display("FAIL div n=%0d x=%h y=%h q=%h", n, dx[g], dy[g], dq[g]);
    end
    xs = wide_t'(sx[g]) <<< n;
    lo = (wide_t'(sr[g]) - 1) * (wide_t'(sr[g]) - 1);
    hi = (wide_t'(sr[g]) + 1) * (wide_t'(sr[g]) + 1);
    checks++;
    if (!(lo < xs && xs < hi) || spp[g] - spn[g] != sr[g]) begin
      failures++;
      $display("FAIL sqrt n=%0d x=%h root=%h", n, sx[g], sr[g]);
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
    for (int t = 0; t < TRIALS; t++) begin
      for (int g = 0; g < 3; g++) begin
        int n;
        n = NS[g];
        dx[g] = rand_op(n, 1);
        dy[g] = rand_op(n, 1);
        sx[g] = rand_op(n, 1) >> ($urandom_range(1, 0));   // 1/4 <= X < 1
        if (t == 0) begin   // range ends
          dx[g] = (op_t'(1) << n) - 1;  dy[g] = op_t'(1) << (n - 1);
          sx[g] = (op_t'(1) << n) - 1;
        end
        if (t == 1) begin
          dx[g] = op_t'(1) << (n - 1);  dy[g] = (op_t'(1) << n) - 1;
          sx[g] = op_t'(1) << (n - 2);
        end
      end
      #1;
      for (int g = 0; g < 3; g++) check(g, NS[g]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
