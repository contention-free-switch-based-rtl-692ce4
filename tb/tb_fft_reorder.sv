// tb_fft_reorder: checks the output reordering map for 1024 points on two PEs
// (the default), 16 points on two PEs and 64 points on four PEs, each against
// reorder_check's replay of the shuffles and the DIF bit reversal.
module tb_fft_reorder;
  logic start = 0;
  logic done_a, done_b, done_c;
  int ca, fa, cb, fb, cc, fc;

  reorder_check #(.N(1024), .NPE(2)) u_a (.start, .done(done_a), .checks(ca), .failures(fa));
  reorder_check #(.N(16),   .NPE(2)) u_b (.start, .done(done_b), .checks(cb), .failures(fb));
  reorder_check #(.N(64),   .NPE(4)) u_c (.start, .done(done_c), .checks(cc), .failures(fc));

  initial begin
    #1 start = 1;
    wait (done_a && done_b && done_c);
    $display("TB_RESULT checks=%0d failures=%0d", ca + cb + cc, fa + fb + fc);
    $finish;
  end

  initial begin
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", ca + cb + cc, fa + fb + fc + 1);
    $finish;
  end
endmodule
