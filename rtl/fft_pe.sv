// fft_pe: radix-2 decimation-in-frequency butterfly (processing element).
//
// Computes c = a + b and d = (a - b) * w on complex 16/16-bit words. The
// difference is formed one bit wider, multiplied by the Q2.14 twiddle w with
// full-precision products, rounded half-up at bit TW_FRAC and wrapped to 16
// bits; c wraps to 16 bits as well. There is no per-stage scaling, matching
// the butterfly equations the engine is built on; keeping the inputs small
// enough not to overflow is left to the user.
//
// Purely combinational: the engine gives it the write cycle of each two-cycle
// read/write slot. Rounding, wrap-around and the twiddle scale are this
// design's choices.
module fft_pe
  import fft_pkg::*;
#(
  parameter int unsigned TW_FRAC_P = TW_FRAC
) (
  input  cplx_t a,
  input  cplx_t b,
  input  cplx_t w,
  output cplx_t c,
  output cplx_t d
);

  localparam int unsigned PW = 2 * DW + 2;  // product / sum width

  logic signed [DW:0]   dr, di;
  logic signed [PW-1:0] pr, pi;
  logic signed [PW-1:0] rnd;

  always_comb begin
    c.re = a.re + b.re;
    c.im = a.im + b.im;

    dr = {a.re[DW-1], a.re} - {b.re[DW-1], b.re};
    di = {a.im[DW-1], a.im} - {b.im[DW-1], b.im};

    rnd = PW'(1) <<< (TW_FRAC_P - 1);
    // (dr + j di)(wr + j wi) = (dr wr - di wi) + j (dr wi + di wr)
    pr = PW'(dr) * PW'(w.re) - PW'(di) * PW'(w.im) + rnd;
    pi = PW'(dr) * PW'(w.im) + PW'(di) * PW'(w.re) + rnd;

    d.re = DW'(pr >>> TW_FRAC_P);
    d.im = DW'(pi >>> TW_FRAC_P);
  end

endmodule
