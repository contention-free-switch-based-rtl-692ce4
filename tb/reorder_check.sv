// reorder_check: checks one fft_reorder instance. It replays where the engine's
// shuffles move every element (in stages log2 NPE .. log2 N - 2 the butterfly
// (i, i + D) exchanges its results' places when bit b-1 of i is set, b being the
// stage's pairing bit) and then requires, for every k, that fft_reorder points
// at the place of element bit-reverse(k), where a DIF transform leaves X(k).
module reorder_check #(
  parameter int N   = 1024,
  parameter int NPE = 2
) (
  input  logic start,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int LOGN  = $clog2(N);
  localparam int LOGM  = $clog2(NPE);
  localparam int NMEM  = 2 * NPE;
  localparam int DEPTH = N / NMEM;
  localparam int AW    = $clog2(DEPTH);
  localparam int MW    = $clog2(NMEM);

  logic [LOGN-1:0] k;
  logic [MW-1:0]   mem;
  logic [AW-1:0]   addr;
  int place [N];   // element index -> physical place

  fft_reorder #(.N(N), .NPE(NPE)) dut (.k, .mem, .addr);

  initial begin
    done = 0; checks = 0; failures = 0; k = '0;
    wait (start);
    for (int n = 0; n < N; n++) place[n] = n;
    for (int t = LOGM; t <= LOGN - 2; t++) begin
      int b;
      b = LOGN - 1 - t;
      for (int i = 0; i < N; i++) begin
        if (((i >> b) & 1) == 0 && ((i >> (b - 1)) & 1) == 1) begin
          int j, tmp;
          j = i + (1 << b);
          tmp = place[i]; place[i] = place[j]; place[j] = tmp;
        end
      end
    end
    for (int kk = 0; kk < N; kk++) begin
      int n;
      n = 0;
      for (int bb = 0; bb < LOGN; bb++) if (((kk >> bb) & 1) != 0) n |= 1 << (LOGN - 1 - bb);
      k = LOGN'(kk);
      #1;
      checks++;
      if (int'(mem) * DEPTH + int'(addr) != place[n]) begin
        failures++;
        if (failures < 10)
          $display("N=%0d NPE=%0d: X(%0d) looked for at %0d/%0d, it is at %0d/%0d", N, NPE, kk,
                   mem, addr, place[n] / DEPTH, place[n] % DEPTH);
      end
    end
    done = 1;
  end
endmodule
