// fft_agu: memory-management unit of the contention-free FFT engine.
//
// For stage t (0 .. log2 N - 1) and slot s (0 .. N/(2*NPE) - 1) it tells every
// processing element which two memories to read, at which addresses, whether
// to swap its inputs, whether to shuffle its outputs, and which twiddle
// exponent to use. The data start with sample n in memory n / (N/(2*NPE)) at
// address n mod (N/(2*NPE)). A DIF stage t pairs x(i) with x(i + D), D =
// N / 2^(t+1), i.e. indices that differ in bit b = log2 N - 1 - t.
//
//  * Safe stages (t <= log2 NPE): D is a multiple of the memory size, so the
//    two operands are at the same address of memories that differ in memory
//    index bit (log2 NPE - t). No swap.
//  * Hazard stages (t > log2 NPE): D is smaller than a memory, so left alone
//    both operands would sit in one memory. Shuffling in the previous stage
//    has moved one of them: PE q reads memory 2q at address s and memory 2q+1
//    at address s XOR mask, mask holding address bits b .. AW-1. The element in
//    the even memory is the higher index x_j exactly when bit b of s is 1, in
//    which case the inputs are swapped.
//  * Hazard prediction: two indices form a hazard pair when their stage is a
//    hazard stage and their XOR equals the stage distance. Every pair of a
//    hazard stage passes that test, so the prediction for the next stage
//    reduces to "t + 1 is a hazard stage", i.e. t >= log2 NPE.
//  * Shuffle: in stages log2 NPE .. log2 N - 2 the butterfly whose lower index
//    i has bit b-1 set writes c to x_j's place and d to x_i's place. Bit b-1 is
//    the bit the next stage pairs on, so of every two next-stage pairs that
//    would share a memory, one is split across the two memories. That bit of i
//    equals bit b-1 of the slot counter.
//  * Twiddle exponent: (i mod D) * 2^t. In hazard stages i mod D is the low b
//    bits of the slot counter; in safe stages it also takes memory index bits.
//
// Every memory is read and written once per slot and every address once per
// stage, so no slot ever has two accesses to one memory. The swap and shuffle
// rules are the ones the engine's contention algorithm states; the particular
// shuffle condition (bit b-1 of i) and the slot schedule it leads to are this
// design's reading of them. Purely combinational.
module fft_agu #(
  parameter int unsigned N   = 1024,
  parameter int unsigned NPE = 2,
  localparam int unsigned LOGN  = $clog2(N),
  localparam int unsigned LOGM  = $clog2(NPE),
  localparam int unsigned NMEM  = 2 * NPE,
  localparam int unsigned MW    = $clog2(NMEM),
  localparam int unsigned DEPTH = N / NMEM,
  localparam int unsigned AW    = $clog2(DEPTH),
  localparam int unsigned SW    = $clog2(LOGN),
  localparam int unsigned EW    = LOGN - 1
) (
  input  logic [SW-1:0] stage,
  input  logic [AW-1:0] slot,
  output logic [AW-1:0] mem_addr   [NMEM],
  output logic [MW-1:0] sel_first  [NPE],
  output logic [MW-1:0] sel_second [NPE],
  output logic          swap       [NPE],
  output logic          shuffle    [NPE],
  output logic [EW-1:0] tw_exp     [NPE],
  output logic          hazard_stage
);

  always_comb begin
    int unsigned t, b, pb;
    logic [AW-1:0]   mask;
    logic [LOGN-1:0] low_i;   // index of the lower operand x_i
    logic [LOGN-1:0] offs;    // i mod D
    logic            shuf_stage;

    pb           = 0;
    low_i        = '0;
    offs         = '0;
    for (int q = 0; q < int'(NPE); q++) begin
      sel_first[q]  = '0;
      sel_second[q] = '0;
      swap[q]       = 1'b0;
      shuffle[q]    = 1'b0;
      tw_exp[q]     = '0;
    end
    t            = int'(stage);
    b            = LOGN - 1 - t;
    hazard_stage = (t > LOGM);
    shuf_stage   = (t >= LOGM) && (t <= LOGN - 2);
    mask         = AW'(((1 << AW) - 1) & ~((1 << b) - 1));

    for (int m = 0; m < int'(NMEM); m++)
      mem_addr[m] = (hazard_stage && m[0]) ? (slot ^ mask) : slot;

    for (int q = 0; q < int'(NPE); q++) begin
      if (hazard_stage) begin
        sel_first[q]  = MW'(2 * q);
        sel_second[q] = MW'(2 * q + 1);
        swap[q]       = slot[b];
        low_i         = LOGN'(slot);
      end else begin
        // Pair memories differing in index bit pb: insert a 0 into q at pb.
        pb            = LOGM - t;
        sel_first[q]  = MW'(((q >> pb) << (pb + 1)) | (q & ((1 << pb) - 1)));
        sel_second[q] = sel_first[q] | MW'(1 << pb);
        swap[q]       = 1'b0;
        low_i         = {sel_first[q], slot};
      end
      if (shuf_stage && b >= 1) shuffle[q] = slot[b-1];
      offs       = low_i & LOGN'((1 << b) - 1);
      tw_exp[q]  = EW'(offs << t);
    end
  end

endmodule
