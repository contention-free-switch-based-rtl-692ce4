// agu_check: drives one fft_agu instance through every stage and slot of an
// N-point transform and checks it against a model that only tracks where each
// element sits. The model starts with x(n) at memory n / (N/(2*NPE)), address
// n mod N/(2*NPE), and moves elements only as the unit's shuffle flags say
// (c to x_j's place, d to x_i's place). Per slot it checks that the 2*NPE reads
// hit distinct memories and that each PE's two operands are a genuine DIF
// pair (indices differ by exactly N / 2^(t+1)); per PE that swap is set
// exactly when the first memory holds the higher index and that the twiddle
// exponent is (i mod D) * 2^t; per stage that every butterfly and every
// memory word is used exactly once and hazard_stage is t > log2 NPE. For
// N = 16, NPE = 2 it also checks the placement of x2(0), x2(2), x3(0) and x3(1)
// in memories 0 and 1. Pulse start; done rises when finished.
module agu_check #(
  parameter int N   = 1024,
  parameter int NPE = 2
) (
  input  logic start,
  output logic done,
  output int   checks,
  output int   failures,
  output int   shuffles,
  output int   swaps
);
  localparam int LOGN  = $clog2(N);
  localparam int LOGM  = $clog2(NPE);
  localparam int NMEM  = 2 * NPE;
  localparam int DEPTH = N / NMEM;
  localparam int AW    = $clog2(DEPTH);
  localparam int MW    = $clog2(NMEM);
  localparam int SW    = $clog2(LOGN);

  logic [SW-1:0]   stage;
  logic [AW-1:0]   slot;
  logic [AW-1:0]   mem_addr   [NMEM];
  logic [MW-1:0]   sel_first  [NPE];
  logic [MW-1:0]   sel_second [NPE];
  logic            swap       [NPE];
  logic            shuffle    [NPE];
  logic [LOGN-2:0] tw_exp     [NPE];
  logic            hazard_stage;

  fft_agu #(.N(N), .NPE(NPE)) dut (.stage, .slot, .mem_addr, .sel_first, .sel_second,
                                   .swap, .shuffle, .tw_exp, .hazard_stage);

  int at [N];     // physical place (mem * DEPTH + addr) -> element index

  task automatic expect_true(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("N=%0d NPE=%0d stage %0d slot %0d: %s", N, NPE, stage, slot, what);
    end
  endtask

  function automatic int mem_of(input int n);
    for (int p = 0; p < N; p++) if (at[p] == n) return p / DEPTH;
    return -1;
  endfunction

  initial begin
    done = 0; checks = 0; failures = 0; shuffles = 0; swaps = 0;
    stage = '0; slot = '0;
    wait (start);
    for (int p = 0; p < N; p++) at[p] = p;
    for (int t = 0; t < LOGN; t++) begin
      int d;
      bit bfly_done [N];
      bit word_used [N];
      d = N >> (t + 1);
      for (int i = 0; i < N; i++) begin bfly_done[i] = 0; word_used[i] = 0; end
      for (int s = 0; s < DEPTH; s++) begin
        bit mem_used [NMEM];
        stage = SW'(t); slot = AW'(s);
        #1;
        expect_true(hazard_stage == (t > LOGM), "hazard_stage flag");
        for (int m = 0; m < NMEM; m++) mem_used[m] = 0;
        for (int q = 0; q < NPE; q++) begin
          int pf, ps, nf, ns, i, j;
          expect_true(!mem_used[sel_first[q]] && !mem_used[sel_second[q]] &&
                      sel_first[q] != sel_second[q], "memory contention");
          mem_used[sel_first[q]] = 1; mem_used[sel_second[q]] = 1;
          pf = int'(sel_first[q]) * DEPTH + int'(mem_addr[sel_first[q]]);
          ps = int'(sel_second[q]) * DEPTH + int'(mem_addr[sel_second[q]]);
          expect_true(!word_used[pf] && !word_used[ps], "memory word used twice in a stage");
          word_used[pf] = 1; word_used[ps] = 1;
          nf = at[pf]; ns = at[ps];
          expect_true((nf ^ ns) == d, $sformatf("operands x(%0d), x(%0d) are no pair", nf, ns));
          i = nf < ns ? nf : ns;
          j = nf < ns ? ns : nf;
          expect_true(swap[q] == (nf > ns), "swap flag");
          expect_true(!bfly_done[i], "butterfly done twice");
          bfly_done[i] = 1;
          expect_true(int'(tw_exp[q]) == ((i % d) << t), "twiddle exponent");
          if (swap[q]) swaps++;
          if (shuffle[q]) begin
            // c (new x_i) goes where x_j was, d (new x_j) where x_i was
            shuffles++;
            at[nf < ns ? ps : pf] = i;
            at[nf < ns ? pf : ps] = j;
          end
        end
      end
      for (int i = 0; i < N; i++) if ((i & d) == 0) expect_true(bfly_done[i], "butterfly missed");
      if (N == 16 && NPE == 2 && t == 1) begin
        expect_true(mem_of(0) == 0 && mem_of(2) == 1, "x2(0), x2(2) not in MEM0, MEM1");
      end
      if (N == 16 && NPE == 2 && t == 2) begin
        expect_true(mem_of(0) == 0 && mem_of(1) == 1, "x3(0), x3(1) not in MEM0, MEM1");
      end
    end
    done = 1;
  end
endmodule
