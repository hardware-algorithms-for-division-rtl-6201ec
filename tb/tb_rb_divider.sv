// tb_rb_divider: self-checking test of the redundant binary array divider.
//
// Three instances are driven: N = 8 with every normalized operand pair
// (128 x 128), N = 16 and N = 64 with random normalized operands. For each
// result it checks, against integer arithmetic done here:
//   * the error bound |Q*Y - X| < Y * 2^-N, i.e. Q is floor or ceil of X/Y,
//   * that the binary output equals the value of the RB digit vectors,
//   * that no digit is both +1 and -1,
//   * at N = 8 and N = 64, that the pruned array (default) selects exactly the
//     same quotient digits as a full array (PRUNE = 0).
// The worked example X = 0.10011101, Y = 0.11000101 must give Q = 0.11001100.
// (Its individual RB digits depend on the carry-free addition rule and are
// not compared.)
// A watchdog ends the run with a failure if it stalls.
module tb_rb_divider;

  int checks = 0;
  int failures = 0;

  localparam int N8 = 8, N16 = 16, N64 = 64;

  logic [N8-1:0]  x8,  y8;   logic [N8:0]  qp8,  qn8,  q8;
  logic [N16-1:0] x16, y16;  logic [N16:0] qp16, qn16, q16;
  logic [N64-1:0] x64, y64;  logic [N64:0] qp64, qn64, q64;

  rb_divider #(.N(N8))  dut8  (.x(x8),  .y(y8),  .q_pos(qp8),  .q_neg(qn8),  .q(q8));
  rb_divider #(.N(N16)) dut16 (.x(x16), .y(y16), .q_pos(qp16), .q_neg(qn16), .q(q16));
  rb_divider #(.N(N64)) dut64 (.x(x64), .y(y64), .q_pos(qp64), .q_neg(qn64), .q(q64));

  // Unpruned arrays: the pruned ones must select exactly the same digits.
  logic [N8:0]  fp8,  fn8,  fq8;
  logic [N64:0] fp64, fn64, fq64;
  rb_divider #(.N(N8),  .PRUNE(1'b0)) full8  (.x(x8),  .y(y8),  .q_pos(fp8),  .q_neg(fn8),  .q(fq8));
  rb_divider #(.N(N64), .PRUNE(1'b0)) full64 (.x(x64), .y(y64), .q_pos(fp64), .q_neg(fn64), .q(fq64));

  task automatic check_same(input int n, input logic [64:0] pp, input logic [64:0] pn,
                            input logic [64:0] fp, input logic [64:0] fn);
    checks++;
    if (pp != fp || pn != fn) begin
      failures++;
      $display("FAIL n=%0d pruned digits +%h -%h, full array +%h -%h", n, pp, pn, fp, fn);
    end
  endtask

  // |Q*Y - X*2^n| < Y, all as integers scaled by 2^n; widths for n <= 64.
  task automatic check_div(input int n, input logic [63:0] xi, input logic [63:0] yi,
                           input logic [64:0] qi, input logic [64:0] qp,
                           input logic [64:0] qn);
    logic signed [200:0] lhs, xs, ys;
    xs  = signed'(201'(xi)) <<< n;
    ys  = signed'(201'(yi));
    lhs = signed'(201'(qi)) * ys - xs;
    checks++;
    if (lhs >= ys || -lhs >= ys) begin
      failures++;
      $display("FAIL n=%0d x=%h y=%h q=%h (error bound)", n, xi, yi, qi);
    end
    checks++;
    if (65'(qp - qn) != qi || (qp & qn) != '0) begin
      failures++;
      $display("FAIL n=%0d x=%h y=%h: binary q=%h does not match digits +%h -%h",
               n, xi, yi, qi, qp, qn);
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
    x16 = '0; y16 = '0; x64 = '0; y64 = '0;
    // Worked example (n = 8).
    x8 = 8'b1001_1101; y8 = 8'b1100_0101;
    #1;
    checks++;
    if (q8 !== 9'b0_1100_1100) begin
      failures++;
      $display("FAIL example: +%b -%b q=%b", qp8, qn8, q8);
    end

    // Exhaustive n = 8.
    for (int xi = 128; xi < 256; xi++)
      for (int yi = 128; yi < 256; yi++) begin
        x8 = 8'(xi); y8 = 8'(yi);
        #1;
        check_div(N8, 64'(xi), 64'(yi), 65'(q8), 65'(qp8), 65'(qn8));
        check_same(N8, 65'(qp8), 65'(qn8), 65'(fp8), 65'(fn8));
      end

    // Random n = 16 and n = 64.
    for (int t = 0; t < 4000; t++) begin
      x16 = {1'b1, 15'($urandom)};
      y16 = {1'b1, 15'($urandom)};
      x64 = {1'b1, 31'($urandom), 32'($urandom)};
      y64 = {1'b1, 31'($urandom), 32'($urandom)};
      if (t == 0) begin x64 = '1; y64 = {1'b1, 63'd0}; end       // largest quotient
      if (t == 1) begin x64 = {1'b1, 63'd0}; y64 = '1; end       // smallest quotient
      if (t == 2) begin x64 = '1; y64 = '1; end                  // equal operands
      #1;
      check_div(N16, 64'(x16), 64'(y16), 65'(q16), 65'(qp16), 65'(qn16));
      check_div(N64, x64, y64, q64, qp64, qn64);
      check_same(N64, qp64, qn64, fp64, fn64);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
