// tb_digit_select: exhaustive test of the digit selection cell.
// All 27 combinations of three digits in {-1,0,1} are applied; the expected
// digit is the sign of the integer 4*d0 + 2*d1 + d2 worked out here.
module tb_digit_select;
  import rb_pkg::*;

  int checks = 0;
  int failures = 0;

  sd_t d0, d1, d2, q;

  digit_select dut (.d0(d0), .d1(d1), .d2(d2), .q(q));

  function automatic sd_t digit(input int v);
    return '{p: (v > 0), n: (v < 0)};
  endfunction

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = -1; a <= 1; a++)
      for (int b = -1; b <= 1; b++)
        for (int c = -1; c <= 1; c++) begin
          int v;
          d0 = digit(a); d1 = digit(b); d2 = digit(c);
          #1;
          v = 4 * a + 2 * b + c;
          checks++;
          if (q !== digit(v)) begin
            failures++;
            $display("FAIL [%0d %0d %0d]: got %b", a, b, c, q);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
