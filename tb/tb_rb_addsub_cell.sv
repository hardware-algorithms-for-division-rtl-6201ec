// tb_rb_addsub_cell: test of the carry-free add/subtract cell.
//
// Single cell, exhaustive: every x, y, m in {-1,0,1}, both values of the
// lower-pair flag, and every incoming carry the lower cell can send under
// that flag ({0,1} when the lower pair has no -1, {-1,0} otherwise). Checked:
// the value identity 2*c_o + z - c_i = x - m*y; that nonneg_o flags a pair
// (x, -m*y) with no -1; that c_o obeys the same promise towards the next cell;
// that no output digit is both +1 and -1.
// Chain: eight cells wired as a row add random 8-digit RB numbers A - m*B;
// the digits plus the top carry must equal the integer A - m*B.
module tb_rb_addsub_cell;
  import rb_pkg::*;

  int checks = 0;
  int failures = 0;

  function automatic sd_t digit(input int v);
    return '{p: (v > 0), n: (v < 0)};
  endfunction
  function automatic int val(input sd_t d);
    return int'(d.p) - int'(d.n);
  endfunction

  // single cell
  sd_t  x, y, m, ci, co, z;
  logic lo_nn, nn_o;
  rb_addsub_cell dut (.x(x), .y(y), .m(m), .lo_nonneg_i(lo_nn), .c_i(ci),
                      .nonneg_o(nn_o), .c_o(co), .z(z));

  // eight-cell row, index 0 most significant
  localparam int L = 8;
  sd_t  ca [0:L-1], cb [0:L-1], cz [0:L-1], cc [0:L];
  logic cn [0:L];
  sd_t  cm, ctop;
  assign cc[L] = SD_ZERO;
  assign cn[L] = 1'b1;
  for (genvar k = 0; k < L; k++) begin : g_chain
    sd_t co_k;
    rb_addsub_cell u (.x(ca[k]), .y(cb[k]), .m(cm), .lo_nonneg_i(cn[k+1]),
                      .c_i(cc[k+1]), .nonneg_o(cn[k]), .c_o(co_k), .z(cz[k]));
    if (k == 0) begin : g_t
      assign ctop = co_k;
    end else begin : g_m
      assign cc[k] = co_k;
    end
  end
  assign cc[0] = SD_ZERO;

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (ca[k]) begin ca[k] = SD_ZERO; cb[k] = SD_ZERO; end
    cm = SD_ZERO;
    for (int xv = -1; xv <= 1; xv++)
      for (int yv = -1; yv <= 1; yv++)
        for (int mv = -1; mv <= 1; mv++)
          for (int f = 0; f <= 1; f++)
            for (int cv = -1; cv <= 1; cv++) begin
              int av;
              if (f == 1 && cv < 0) continue;
              if (f == 0 && cv > 0) continue;
              x = digit(xv); y = digit(yv); m = digit(mv);
              lo_nn = f[0]; ci = digit(cv);
              #1;
              av = -mv * yv;
              checks++;
              if (2 * val(co) + val(z) - cv != xv + av || (z.p & z.n) || (co.p & co.n)
                  || nn_o !== (xv >= 0 && av >= 0)
                  || (nn_o && val(co) < 0) || (!nn_o && val(co) > 0)) begin
                failures++;
                $display("FAIL x=%0d y=%0d m=%0d flag=%0d cin=%0d: c=%0d z=%0d nn=%0d",
                         xv, yv, mv, f, cv, val(co), val(z), nn_o);
              end
            end

    for (int t = 0; t < 3000; t++) begin
      int want, got, mv;
      want = 0;
      mv = int'($urandom_range(2, 0)) - 1;
      cm = digit(mv);
      for (int k = 0; k < L; k++) begin
        int av, bv;
        av = int'($urandom_range(2, 0)) - 1;
        bv = int'($urandom_range(2, 0)) - 1;
        ca[k] = digit(av); cb[k] = digit(bv);
        want += (av - mv * bv) * (1 << (L - 1 - k));
      end
      #1;
      got = val(ctop) * (1 << L);
      for (int k = 0; k < L; k++) got += val(cz[k]) * (1 << (L - 1 - k));
      checks++;
      if (got != want) begin
        failures++;
        $display("FAIL chain: got %0d want %0d", got, want);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
