// tb_rb2bin: test of the redundant binary to binary converter (W = 12).
// Random digit strings are drawn, digit by digit, with no digit both +1 and
// -1 and a nonnegative value; the expected binary word is the sum of
// digit * 2^k accumulated here one digit at a time.
module tb_rb2bin;

  int checks = 0;
  int failures = 0;

  localparam int unsigned W = 12;

  logic [W-1:0] pos, neg, bin;

  rb2bin #(.W(W)) dut (.pos(pos), .neg(neg), .bin(bin));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t;
    t = 0;
    while (t < 2000) begin
      int val;
      val = 0;
      for (int k = 0; k < W; k++) begin
        int r;
        r = int'($urandom_range(2, 0)) - 1;
        pos[k] = (r > 0);
        neg[k] = (r < 0);
        val += r * (1 << k);
      end
      if (val < 0) continue;
      t++;
      #1;
      checks++;
      if (int'(bin) != val) begin
        failures++;
        $display("FAIL +%b -%b: got %0d want %0d", pos, neg, bin, val);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
