// fft_top: switch-based radix-2 decimation-in-frequency FFT engine.
//
// NPE butterfly processing elements share 2*NPE single-port data memories of
// N/(2*NPE) words through a switch fabric; each PE has its own twiddle memory
// of N/2 words. The default is the 1024-point, two-PE configuration: four
// 256 x 32 data RAMs and two 512 x 32 twiddle ROMs.
//
// Operation, repeated frame after frame:
//   1. LOAD: in_ready is high; each cycle with in_valid stores one sample,
//      x(0) first, x(n) in memory n / (N/(2*NPE)) at address n mod N/(2*NPE).
//   2. COMPUTE (busy high): log2 N stages, each of N/(2*NPE) two-cycle slots.
//      In the read cycle every memory and every twiddle memory is read once;
//      in the write cycle the PEs' results go back, in place, through the
//      fabric. The memory-management unit (fft_agu) arranges, by swapping PE
//      inputs and shuffling PE outputs, that the two operands of a butterfly
//      are never in the same memory, so no slot stalls. 5120 cycles for
//      N = 1024, NPE = 2.
//   3. UNLOAD: X(0) .. X(N-1) leave on out_data, one per cycle, out_index
//      giving k; the first appears one cycle after COMPUTE ends. done pulses
//      with X(N-1). fft_reorder finds each bin despite bit reversal and
//      shuffling.
// The load/unload interface and the reset are this design's own; the memory
// organisation, stage timing and swap/shuffle scheme follow the engine's
// description.
module fft_top
  import fft_pkg::*;
#(
  parameter int unsigned N   = 1024,
  parameter int unsigned NPE = 2,
  localparam int unsigned LOGN  = $clog2(N),
  localparam int unsigned NMEM  = 2 * NPE,
  localparam int unsigned MW    = $clog2(NMEM),
  localparam int unsigned DEPTH = N / NMEM,
  localparam int unsigned AW    = $clog2(DEPTH),
  localparam int unsigned SW    = $clog2(LOGN),
  localparam int unsigned EW    = LOGN - 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  output logic            in_ready,
  input  cplx_t           in_data,
  output logic            busy,
  output logic            out_valid,
  output logic [LOGN-1:0] out_index,
  output cplx_t           out_data,
  output logic            done
);

  // ---------------- sequencer ----------------
  phase_e          phase;
  logic [LOGN-1:0] load_idx, unload_idx;
  logic [SW-1:0]   stage;
  logic [AW-1:0]   slot;
  logic            wr_cycle, last_unload, in_fire;

  assign in_ready = (phase == PH_LOAD);
  assign in_fire  = in_valid && in_ready;
  assign busy     = (phase == PH_COMPUTE);

  fft_ctrl #(.N(N), .NPE(NPE)) u_ctrl (
    .clk, .rst_n, .in_fire, .phase, .load_idx, .stage, .slot, .wr_cycle,
    .unload_idx, .last_unload
  );

  // ---------------- memory management ----------------
  logic [AW-1:0] agu_addr   [NMEM];
  logic [MW-1:0] sel_first  [NPE];
  logic [MW-1:0] sel_second [NPE];
  logic          swap       [NPE];
  logic          shuffle    [NPE];
  logic [EW-1:0] tw_exp     [NPE];
  logic          hazard_stage;

  fft_agu #(.N(N), .NPE(NPE)) u_agu (
    .stage, .slot, .mem_addr(agu_addr), .sel_first, .sel_second, .swap,
    .shuffle, .tw_exp, .hazard_stage
  );

  // ---------------- output reordering ----------------
  logic [MW-1:0] rd_mem;
  logic [AW-1:0] rd_addr;

  fft_reorder #(.N(N), .NPE(NPE)) u_reorder (.k(unload_idx), .mem(rd_mem), .addr(rd_addr));

  // ---------------- data memories ----------------
  cplx_t mem_rdata [NMEM];
  cplx_t mem_wdata [NMEM];

  for (genvar m = 0; m < int'(NMEM); m++) begin : g_mem
    logic          en, we;
    logic [AW-1:0] addr;
    cplx_t         wdata;

    always_comb begin
      en    = 1'b0;
      we    = 1'b0;
      addr  = '0;
      wdata = mem_wdata[m];
      unique case (phase)
        PH_LOAD: begin
          en    = in_fire && (load_idx[LOGN-1:AW] == MW'(m));
          we    = 1'b1;
          addr  = load_idx[AW-1:0];
          wdata = in_data;
        end
        PH_COMPUTE: begin
          en   = 1'b1;
          we   = wr_cycle;
          addr = agu_addr[m];
        end
        PH_UNLOAD: begin
          en   = (rd_mem == MW'(m));
          addr = rd_addr;
        end
        default: ;
      endcase
    end

    fft_ram #(.DEPTH(DEPTH), .WIDTH(2 * DW)) u_ram (
      .clk, .en, .we, .addr, .wdata, .rdata(mem_rdata[m])
    );
  end

  // ---------------- processing elements and twiddle memories ----------------
  cplx_t pe_a [NPE];
  cplx_t pe_b [NPE];
  cplx_t pe_c [NPE];
  cplx_t pe_d [NPE];
  cplx_t pe_w [NPE];

  for (genvar q = 0; q < int'(NPE); q++) begin : g_pe
    fft_rom #(.N(N), .DEPTH(N / 2)) u_rom (
      .clk, .en(busy && !wr_cycle), .addr(tw_exp[q]), .rdata(pe_w[q])
    );
    fft_pe u_pe (.a(pe_a[q]), .b(pe_b[q]), .w(pe_w[q]), .c(pe_c[q]), .d(pe_d[q]));
  end

  fft_switch #(.NPE(NPE)) u_switch (
    .mem_rdata, .sel_first, .sel_second, .swap, .shuffle, .pe_a, .pe_b,
    .pe_c, .pe_d, .mem_wdata
  );

  // ---------------- output port ----------------
  logic [MW-1:0] out_mem;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_index <= '0;
      out_mem   <= '0;
      done      <= 1'b0;
    end else begin
      out_valid <= (phase == PH_UNLOAD);
      out_index <= unload_idx;
      out_mem   <= rd_mem;
      done      <= last_unload;
    end
  end

  assign out_data = mem_rdata[out_mem];

  // ---------------- contention check ----------------
  // In every compute slot the 2*NPE operand reads hit 2*NPE distinct memories,
  // and a hazard stage pairs each PE with memories 2q and 2q+1.
  always_ff @(posedge clk) begin
    if (busy) begin
      for (int q = 0; q < int'(NPE); q++) begin
        assert (sel_first[q] != sel_second[q])
          else $error("PE %0d reads one memory twice", q);
        if (hazard_stage)
          assert (sel_first[q] == MW'(2 * q) && sel_second[q] == MW'(2 * q + 1))
            else $error("PE %0d off its memory pair in a hazard stage", q);
        for (int r = 0; r < q; r++)
          assert (sel_first[q] != sel_first[r] && sel_first[q] != sel_second[r] &&
                  sel_second[q] != sel_first[r] && sel_second[q] != sel_second[r])
            else $error("PEs %0d and %0d share a memory", q, r);
      end
    end
  end

endmodule
