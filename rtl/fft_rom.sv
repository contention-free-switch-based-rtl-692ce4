// fft_rom: twiddle-factor memory of one processing element.
//
// Entry e holds W_N^e = exp(-j*2*pi*e/N) for e = 0 .. DEPTH-1 as {cos, -sin},
// each part a 16-bit Q2.14 value rounded to nearest. DEPTH = N/2 covers every
// exponent a radix-2 decimation-in-frequency stage needs, so no folding logic is
// required (512 words for N = 1024, as in the engine's specification).
// Synchronous read: the address is taken at a clock edge with en high and the
// word appears on rdata the following cycle, like the data RAMs.
//
// The table is computed at elaboration by a constant function (Taylor series
// of cos and sin, 40 terms, argument below pi); that method is this design's
// choice.
module fft_rom
  import fft_pkg::*;
#(
  parameter int unsigned N     = 1024,
  parameter int unsigned DEPTH = N / 2
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic [$clog2(DEPTH)-1:0] addr,
  output cplx_t                    rdata
);

  typedef logic [2*DW-1:0] table_t [DEPTH];

  function automatic logic signed [DW-1:0] to_fix(input real v);
    real s;
    s = v * real'(1 << TW_FRAC);
    return DW'($rtoi(s >= 0.0 ? s + 0.5 : s - 0.5));
  endfunction

  function automatic table_t gen_table();
    table_t t;
    for (int e = 0; e < int'(DEPTH); e++) begin
      real x, c, s, term;
      x    = 2.0 * 3.14159265358979323846 * real'(e) / real'(N);
      c    = 1.0;
      s    = 0.0;
      term = 1.0;
      for (int k = 1; k < 40; k++) begin
        term = term * x / real'(k);
        case (k % 4)
          0:       c = c + term;
          1:       s = s + term;
          2:       c = c - term;
          default: s = s - term;
        endcase
      end
      t[e] = {to_fix(c), to_fix(-s)};
    end
    return t;
  endfunction

  localparam table_t TABLE = gen_table();

  always_ff @(posedge clk) begin
    if (en) rdata <= cplx_t'(TABLE[addr]);
  end

endmodule
