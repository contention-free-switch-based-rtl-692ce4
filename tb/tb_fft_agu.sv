// tb_fft_agu: checks the memory-management unit with agu_check in three
// configurations: 1024 points on two PEs (the default), 16 points on two PEs
// (the small example, with its memory placements) and 64 points on four PEs.
// Each must be contention-free in every slot, compute every DIF butterfly
// once with the right twiddle, and use both swap and shuffle.
module tb_fft_agu;
  logic start = 0;
  logic done_a, done_b, done_c;
  int ca, fa, sha, swa, cb, fb, shb, swb, cc, fc, shc, swc;
  int checks, failures;

  agu_check #(.N(1024), .NPE(2)) u_a (.start, .done(done_a), .checks(ca), .failures(fa), .shuffles(sha), .swaps(swa));
  agu_check #(.N(16),   .NPE(2)) u_b (.start, .done(done_b), .checks(cb), .failures(fb), .shuffles(shb), .swaps(swb));
  agu_check #(.N(64),   .NPE(4)) u_c (.start, .done(done_c), .checks(cc), .failures(fc), .shuffles(shc), .swaps(swc));

  initial begin
    #1 start = 1;
    wait (done_a && done_b && done_c);
    checks = ca + cb + cc + 3;
    failures = fa + fb + fc;
    if (sha == 0 || swa == 0) failures++;
    if (shb == 0 || swb == 0) failures++;
    if (shc == 0 || swc == 0) failures++;
    $display("swaps %0d/%0d/%0d shuffles %0d/%0d/%0d", swa, swb, swc, sha, shb, shc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", ca + cb + cc, fa + fb + fc + 1);
    $finish;
  end
endmodule
