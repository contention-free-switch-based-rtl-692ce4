// tb_fft_top_m4: end-to-end test of the 1024-point engine built with four PEs,
// eight 128-word memories and four twiddle ROMs. It exercises the general
// memory pairing of the safe stages (three of them here) and checks the
// NPE-fold speedup: the compute phase must take 2 * 128 * 10 = 2560 cycles,
// half of the two-PE engine's 5120. Otherwise the same as tb_fft_top.
//
// Three frames are pushed through: random samples (parts in -15..15), a single
// complex tone, and random samples again with gaps in in_valid. Every output
// bin is compared with a bit-exact model of the same fixed-point arithmetic
// (plain in-place DIF FFT, twiddles from $cos/$sin, output bit-reversed), and
// a set of bins also with a double-precision DFT within a tolerance. The
// compute phase must take exactly 2 * N/(2*NPE) * log2 N cycles (2560). The
// testbench counts how often the engine's mechanisms occur (swapped inputs,
// shuffled outputs, both at once, hazard and safe stages, out-of-place output
// reads) and fails any that never happens.
module tb_fft_top_m4;
  import fft_pkg::*;

  localparam int N    = 1024;
  localparam int NPE  = 4;
  localparam int LOGN = $clog2(N);
  localparam int EXPECTED_COMPUTE = 2 * (N / (2 * NPE)) * LOGN;
  localparam int NFRAMES = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, in_ready, busy, out_valid, done;
  cplx_t in_data, out_data;
  logic [LOGN-1:0] out_index;

  fft_top #(.N(N), .NPE(NPE)) dut (.*);

  always #1 clk = ~clk;

  int checks = 0, failures = 0;

  // ---------------- reference model ----------------
  int xr [N], xi [N];        // samples of the current frame
  int rr [N], ri [N];        // expected X(k)

  function automatic int wrap16(input longint v);
    return int'(shortint'(v));
  endfunction

  function automatic int tw_fix(input real v);
    real s = v * 16384.0;
    return $rtoi(s >= 0.0 ? s + 0.5 : s - 0.5);
  endfunction

  function automatic real rabs(input real v);
    return v < 0.0 ? -v : v;
  endfunction

  task automatic ref_fft();
    int ar [N], ai [N];
    for (int n = 0; n < N; n++) begin ar[n] = xr[n]; ai[n] = xi[n]; end
    for (int t = 0; t < LOGN; t++) begin
      int d = N >> (t + 1);
      for (int i = 0; i < N; i++) begin
        if ((i & d) == 0) begin
          int j = i + d;
          int e = (i % d) << t;
          real ang = 2.0 * 3.14159265358979323846 * e / N;
          int wr = tw_fix($cos(ang)), wi = tw_fix(-$sin(ang));
          longint dr = longint'(ar[i]) - longint'(ar[j]), di = longint'(ai[i]) - longint'(ai[j]);
          longint pr = dr * wr - di * wi + 8192, pi = dr * wi + di * wr + 8192;
          int cr = wrap16(longint'(ar[i]) + longint'(ar[j])), ci = wrap16(longint'(ai[i]) + longint'(ai[j]));
          ar[j] = wrap16(pr >>> 14); ai[j] = wrap16(pi >>> 14);
          ar[i] = cr; ai[i] = ci;
        end
      end
    end
    for (int k = 0; k < N; k++) begin
      int n = 0;
      for (int b = 0; b < LOGN; b++) if ((k & (1 << b)) != 0) n |= 1 << (LOGN - 1 - b);
      rr[k] = ar[n]; ri[k] = ai[n];
    end
  endtask

  // ---------------- mechanism counters ----------------
  int n_swap = 0, n_shuffle = 0, n_both = 0, n_hazard_slot = 0, n_safe_slot = 0;
  int n_moved_out = 0, n_in_gap = 0, compute_cycles = 0;

  always @(posedge clk) if (rst_n) begin
    if (busy) compute_cycles++;
    if (busy && !dut.wr_cycle) begin
      if (dut.hazard_stage) n_hazard_slot++; else n_safe_slot++;
      for (int q = 0; q < NPE; q++) begin
        if (dut.swap[q]) n_swap++;
        if (dut.shuffle[q]) n_shuffle++;
        if (dut.swap[q] && dut.shuffle[q]) n_both++;
      end
    end
    if (dut.phase == PH_UNLOAD &&
        {dut.rd_mem, dut.rd_addr} != dut.unload_idx) n_moved_out++;
    if (in_ready && !in_valid) n_in_gap++;
  end

  // ---------------- stimulus and checking ----------------
  task automatic make_frame(input int f);
    for (int n = 0; n < N; n++) begin
      if (f == 1) begin
        // tone at bin 37, amplitude 12
        real a = 2.0 * 3.14159265358979323846 * 37 * n / N;
        xr[n] = $rtoi(12.0 * $cos(a)); xi[n] = $rtoi(12.0 * $sin(a));
      end else begin
        xr[n] = int'($urandom_range(30)) - 15;
        xi[n] = int'($urandom_range(30)) - 15;
      end
    end
  endtask

  task automatic run_frame(input int f);
    int got_r [N], got_i [N];
    int seen;
    int start_cycles;
    real maxerr;
    make_frame(f);
    ref_fft();
    start_cycles = compute_cycles;
    // load
    for (int n = 0; n < N; ) begin
      in_valid <= (f == 2) ? ($urandom_range(3) != 0) : 1'b1;
      in_data  <= '{re: 16'(xr[n]), im: 16'(xi[n])};
      @(posedge clk);
      if (in_valid && in_ready) n++;
    end
    in_valid <= 1'b0;
    // collect
    seen = 0;
    while (seen < N) begin
      @(posedge clk);
      if (out_valid) begin
        checks++;
        if (int'(out_index) != seen) begin
          failures++;
          $display("frame %0d: out_index %0d, expected %0d", f, out_index, seen);
        end
        got_r[out_index] = int'(out_data.re);
        got_i[out_index] = int'(out_data.im);
        if (seen == N - 1) begin
          checks++;
          if (!done) begin failures++; $display("frame %0d: no done pulse", f); end
        end
        seen++;
      end
    end
    // compute time
    checks++;
    if (compute_cycles - start_cycles != EXPECTED_COMPUTE) begin
      failures++;
      $display("frame %0d: compute took %0d cycles, expected %0d", f,
               compute_cycles - start_cycles, EXPECTED_COMPUTE);
    end
    // bit-exact comparison
    for (int k = 0; k < N; k++) begin
      checks++;
      if (got_r[k] != rr[k] || got_i[k] != ri[k]) begin
        failures++;
        if (failures < 10)
          $display("frame %0d: X(%0d) = (%0d, %0d), expected (%0d, %0d)", f, k,
                   got_r[k], got_i[k], rr[k], ri[k]);
      end
    end
    // floating-point DFT on every 16th bin
    maxerr = 0.0;
    for (int k = 0; k < N; k += 16) begin
      real sr = 0.0, si = 0.0;
      for (int n = 0; n < N; n++) begin
        real a = -2.0 * 3.14159265358979323846 * ((k * n) % N) / N;
        sr += xr[n] * $cos(a) - xi[n] * $sin(a);
        si += xr[n] * $sin(a) + xi[n] * $cos(a);
      end
      if (rabs(sr - got_r[k]) > maxerr) maxerr = rabs(sr - got_r[k]);
      if (rabs(si - got_i[k]) > maxerr) maxerr = rabs(si - got_i[k]);
    end
    checks++;
    if (maxerr > 40.0) begin
      failures++;
      $display("frame %0d: fixed-point result %0f off the exact DFT", f, maxerr);
    end
    if (f == 1) begin
      checks++;
      // 12 * N = 12288, less what truncating the samples to integers takes
      if (got_r[37] < 11 * N || got_r[37] > 12 * N + 50) begin
        failures++;
        $display("tone bin X(37) = %0d, expected 11N .. 12N", got_r[37]);
      end
      for (int k = 0; k < N; k++) if (k != 37) begin
        checks++;
        if (got_r[k] > 300 || got_r[k] < -300 || got_i[k] > 300 || got_i[k] < -300) begin
          failures++;
          $display("tone leaks into X(%0d) = (%0d, %0d)", k, got_r[k], got_i[k]);
        end
      end
    end
    $display("frame %0d done: max error against the exact DFT %0.2f", f, maxerr);
  endtask

  initial begin
    in_valid = 1'b0;
    in_data  = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < NFRAMES; f++) run_frame(f);
    $display("mechanisms: swap=%0d shuffle=%0d swap+shuffle=%0d hazard-slots=%0d safe-slots=%0d reordered-reads=%0d input-gaps=%0d",
             n_swap, n_shuffle, n_both, n_hazard_slot, n_safe_slot, n_moved_out, n_in_gap);
    checks++; if (n_swap == 0)        begin failures++; $display("swap never happened"); end
    checks++; if (n_shuffle == 0)     begin failures++; $display("shuffle never happened"); end
    checks++; if (n_both == 0)        begin failures++; $display("swap with shuffle never happened"); end
    checks++; if (n_hazard_slot == 0) begin failures++; $display("no hazard stage"); end
    checks++; if (n_safe_slot == 0)   begin failures++; $display("no safe stage"); end
    checks++; if (n_moved_out == 0)   begin failures++; $display("no reordered read-out"); end
    checks++; if (n_in_gap == 0)      begin failures++; $display("no input gap"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
