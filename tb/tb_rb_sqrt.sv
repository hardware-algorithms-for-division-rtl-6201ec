// tb_rb_sqrt: self-checking test of the redundant binary array square rooter.
//
// N = 8 and N = 16 are driven with every operand in [1/4, 1); N = 64 with
// random operands and the range ends. For each root it checks, in integer
// arithmetic done here, that |Q - sqrt(X)| < 2^-N, written without a square
// root as (Q' - 1)^2 < X' * 2^N < (Q' + 1)^2 with Q' = Q * 2^N, X' = X * 2^N;
// that the binary output equals the value of the RB digit vectors; and that
// p_1 = 1. At N = 16 and N = 64 the pruned array (default) must select exactly
// the same root digits as a full array (PRUNE = 0). The worked example X = 0.10001101 must give Q = 0.10111110.
// A watchdog ends the run with a failure if it stalls.
module tb_rb_sqrt;

  int checks = 0;
  int failures = 0;

  localparam int N8 = 8, N16 = 16, N64 = 64;

  logic [N8-1:0]  x8;   logic [N8-1:0]  pp8,  pn8;   logic [N8:0]  r8;
  logic [N16-1:0] x16;  logic [N16-1:0] pp16, pn16;  logic [N16:0] r16;
  logic [N64-1:0] x64;  logic [N64-1:0] pp64, pn64;  logic [N64:0] r64;

  rb_sqrt #(.N(N8))  dut8  (.x(x8),  .p_pos(pp8),  .p_neg(pn8),  .root(r8));
  rb_sqrt #(.N(N16)) dut16 (.x(x16), .p_pos(pp16), .p_neg(pn16), .root(r16));
  rb_sqrt #(.N(N64)) dut64 (.x(x64), .p_pos(pp64), .p_neg(pn64), .root(r64));

  // Unpruned arrays: the pruned ones must select exactly the same digits.
  logic [N16-1:0] fp16, fn16;  logic [N16:0] fr16;
  logic [N64-1:0] fp64, fn64;  logic [N64:0] fr64;
  rb_sqrt #(.N(N16), .PRUNE(1'b0)) full16 (.x(x16), .p_pos(fp16), .p_neg(fn16), .root(fr16));
  rb_sqrt #(.N(N64), .PRUNE(1'b0)) full64 (.x(x64), .p_pos(fp64), .p_neg(fn64), .root(fr64));

  task automatic check_same(input int n, input logic [63:0] pp, input logic [63:0] pn,
                            input logic [63:0] fp, input logic [63:0] fn);
    checks++;
    if (pp != fp || pn != fn) begin
      failures++;
      $display("FAIL n=%0d pruned digits +%h -%h, full array +%h -%h", n, pp, pn, fp, fn);
    end
  endtask

  task automatic check_sqrt(input int n, input logic [63:0] xi, input logic [64:0] qi,
                            input logic [63:0] pp, input logic [63:0] pn);
    logic [200:0] xs, lo, hi;
    xs = 201'(xi) << n;
    lo = (201'(qi) - 1) * (201'(qi) - 1);
    hi = (201'(qi) + 1) * (201'(qi) + 1);
    checks++;
    if (qi == 0 || !(lo < xs && xs < hi)) begin
      failures++;
      $display("FAIL n=%0d x=%h root=%h (error bound)", n, xi, qi);
    end
    checks++;
    if (65'(pp) - 65'(pn) != qi || (pp & pn) != '0 || !pp[n-1]) begin
      failures++;
      $display("FAIL n=%0d x=%h: root=%h does not match digits +%h -%h",
               n, xi, qi, pp, pn);
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
    x16 = 16'h4000; x64 = {2'b01, 62'd0};
    // Worked example (n = 8).
    x8 = 8'b1000_1101;
    #1;
    checks++;
    if (r8 !== 9'b0_1011_1110) begin
      failures++;
      $display("FAIL example: +%b -%b root=%b", pp8, pn8, r8);
    end

    for (int xi = 64; xi < 256; xi++) begin
      x8 = 8'(xi);
      #1;
      check_sqrt(N8, 64'(xi), 65'(r8), 64'(pp8), 64'(pn8));
    end
    for (int xi = 16384; xi < 65536; xi++) begin
      x16 = 16'(xi);
      #1;
      check_sqrt(N16, 64'(xi), 65'(r16), 64'(pp16), 64'(pn16));
      check_same(N16, 64'(pp16), 64'(pn16), 64'(fp16), 64'(fn16));
    end
    for (int t = 0; t < 3000; t++) begin
      x64 = {32'($urandom), 32'($urandom)};
      if (x64[63:62] == 2'b00) x64[62] = 1'b1;
      if (t == 0) x64 = '1;                   // largest operand
      if (t == 1) x64 = {2'b01, 62'd0};       // smallest operand, exact root
      if (t == 2) x64 = {2'b10, 62'd0};       // 1/2
      #1;
      check_sqrt(N64, x64, r64, pp64, pn64);
      check_same(N64, pp64, pn64, fp64, fn64);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
