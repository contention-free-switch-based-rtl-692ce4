// fft_reorder: locates output bin X(k) in the data memories after the last
// stage, so the results can be read out in natural frequency order.
//
// A decimation-in-frequency FFT leaves X(k) at index n = bit-reverse(k). The
// shuffles of the memory-management unit (stages log2 NPE .. log2 N - 2) have
// further moved the element of index n to the place whose low AW+1 bits are
// the prefix XOR of n: p[j] = n[j] ^ n[j-1] ^ ... ^ n[0] for j <= AW, with the
// higher bits unchanged (AW = log2 of the memory depth). Memory = p[top],
// address = p[AW-1:0]. Purely combinational; the formula is derived from this
// design's shuffle rule.
module fft_reorder #(
  parameter int unsigned N   = 1024,
  parameter int unsigned NPE = 2,
  localparam int unsigned LOGN  = $clog2(N),
  localparam int unsigned NMEM  = 2 * NPE,
  localparam int unsigned MW    = $clog2(NMEM),
  localparam int unsigned AW    = $clog2(N / NMEM)
) (
  input  logic [LOGN-1:0] k,
  output logic [MW-1:0]   mem,
  output logic [AW-1:0]   addr
);

  logic [LOGN-1:0] n, p;

  always_comb begin
    for (int j = 0; j < int'(LOGN); j++) n[j] = k[LOGN-1-j];
    p = n;
    for (int j = 1; j <= int'(AW); j++) p[j] = n[j] ^ p[j-1];
    mem  = p[LOGN-1:AW];
    addr = p[AW-1:0];
  end

endmodule
