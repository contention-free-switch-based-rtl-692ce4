// fft_pkg: word format and shared types of the switch-based radix-2 FFT engine.
//
// A memory word is one complex sample, 32 bits wide: a 16-bit two's-complement
// real part in the upper half and a 16-bit imaginary part in the lower half.
// Twiddle words use the same layout with cos and -sin in Q2.14, so that +1.0
// and -1.0 are exact. The 32-bit word width and the 16/16 split follow the
// engine's specification; the Q2.14 twiddle scale is this design's choice.
package fft_pkg;

  localparam int unsigned DW      = 16;  // bits per real or imaginary part
  localparam int unsigned TW_FRAC = 14;  // fraction bits of a twiddle part

  typedef struct packed {
    logic signed [DW-1:0] re;
    logic signed [DW-1:0] im;
  } cplx_t;

  // Sequencer phases: take N samples, run the butterfly stages, read out.
  typedef enum logic [1:0] {
    PH_LOAD    = 2'd0,
    PH_COMPUTE = 2'd1,
    PH_UNLOAD  = 2'd2
  } phase_e;

endpackage
