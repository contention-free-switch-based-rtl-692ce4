// tb_fft_switch: drives the switch fabric of the default two-PE engine with
// random memory data, random assignments of the four memories to the PEs'
// first/second operands, random swap/shuffle flags and random PE results.
// Checks that a/b get the right memory words (exchanged on swap) and that c is
// written where x_i was (where x_j was on shuffle) and d to the other memory.
module tb_fft_switch;
  import fft_pkg::*;
  localparam int NPE = 2;
  localparam int NMEM = 2 * NPE;

  cplx_t      mem_rdata [NMEM];
  logic [1:0] sel_first [NPE];
  logic [1:0] sel_second [NPE];
  logic       swap [NPE];
  logic       shuffle [NPE];
  cplx_t      pe_a [NPE];
  cplx_t      pe_b [NPE];
  cplx_t      pe_c [NPE];
  cplx_t      pe_d [NPE];
  cplx_t      mem_wdata [NMEM];
  int checks = 0, failures = 0;
  int seen_combo [4];

  fft_switch #(.NPE(NPE)) dut (.*);

  initial begin
    for (int i = 0; i < 4; i++) seen_combo[i] = 0;
    for (int iter = 0; iter < 5000; iter++) begin
      int perm [NMEM];
      for (int m = 0; m < NMEM; m++) begin perm[m] = m; mem_rdata[m] = cplx_t'($urandom); end
      perm.shuffle();
      for (int q = 0; q < NPE; q++) begin
        sel_first[q]  = 2'(perm[2 * q]);
        sel_second[q] = 2'(perm[2 * q + 1]);
        swap[q]       = 1'($urandom_range(1));
        shuffle[q]    = 1'($urandom_range(1));
        pe_c[q]       = cplx_t'($urandom);
        pe_d[q]       = cplx_t'($urandom);
      end
      #1;
      for (int q = 0; q < NPE; q++) begin
        int loc_i, loc_j;
        loc_i = swap[q] ? perm[2 * q + 1] : perm[2 * q];
        loc_j = swap[q] ? perm[2 * q] : perm[2 * q + 1];
        seen_combo[{swap[q], shuffle[q]}]++;
        checks++;
        if (pe_a[q] !== mem_rdata[loc_i] || pe_b[q] !== mem_rdata[loc_j]) begin
          failures++;
          if (failures < 10) $display("PE %0d inputs misrouted (swap=%0d)", q, swap[q]);
        end
        checks++;
        if (mem_wdata[shuffle[q] ? loc_j : loc_i] !== pe_c[q] ||
            mem_wdata[shuffle[q] ? loc_i : loc_j] !== pe_d[q]) begin
          failures++;
          if (failures < 10) $display("PE %0d results misrouted (swap=%0d shuffle=%0d)", q, swap[q], shuffle[q]);
        end
      end
    end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (seen_combo[i] == 0) failures++;
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
