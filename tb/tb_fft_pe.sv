// tb_fft_pe: checks the butterfly c = a + b, d = (a - b) * w against integer
// arithmetic done here: directed twiddles (1, -j, -1, W_8) and random full-range
// operands, with 16-bit wrap-around and half-up rounding of the Q2.14 product.
module tb_fft_pe;
  import fft_pkg::*;

  cplx_t a, b, w, c, d;
  int checks = 0, failures = 0;

  fft_pe dut (.a, .b, .w, .c, .d);

  function automatic int wrap16(input longint v);
    return int'(shortint'(v));
  endfunction

  task automatic check(input int ar, ai, br, bi, wr, wi);
    longint dr, di, pr, pi;
    int er, ei, fr, fi;
    a = '{re: 16'(ar), im: 16'(ai)};
    b = '{re: 16'(br), im: 16'(bi)};
    w = '{re: 16'(wr), im: 16'(wi)};
    #1;
    dr = longint'(ar) - longint'(br);
    di = longint'(ai) - longint'(bi);
    pr = dr * wr - di * wi;
    pi = dr * wi + di * wr;
    er = wrap16(longint'(ar) + longint'(br));
    ei = wrap16(longint'(ai) + longint'(bi));
    fr = wrap16((pr + 8192) >>> 14);
    fi = wrap16((pi + 8192) >>> 14);
    checks++;
    if (int'(c.re) != er || int'(c.im) != ei || int'(d.re) != fr || int'(d.im) != fi) begin
      failures++;
      if (failures < 10)
        $display("a=(%0d,%0d) b=(%0d,%0d) w=(%0d,%0d): c=(%0d,%0d) d=(%0d,%0d), expected c=(%0d,%0d) d=(%0d,%0d)",
                 ar, ai, br, bi, wr, wi, c.re, c.im, d.re, d.im, er, ei, fr, fi);
    end
  endtask

  function automatic int r16();
    return int'($urandom_range(65535)) - 32768;
  endfunction

  initial begin
    // directed: w = 1, -j, -1, exp(-j pi/4)
    check(100, -50, 30, 20, 16384, 0);
    check(100, -50, 30, 20, 0, -16384);
    check(7, 3, -9, 4, -16384, 0);
    check(1000, 1000, -1000, 0, 11585, -11585);
    check(32767, 0, 1, 0, 16384, 0);        // c wraps
    check(-3, -3, 0, 0, 8192, 8192);        // rounding of -1.5
    for (int i = 0; i < 20000; i++) begin
      int wr, wi;
      wr = int'($urandom_range(32768)) - 16384;
      wi = int'($urandom_range(32768)) - 16384;
      if (i % 2 == 0) check(r16() / 4, r16() / 4, r16() / 4, r16() / 4, wr, wi);
      else            check(r16(), r16(), r16(), r16(), wr, wi);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
