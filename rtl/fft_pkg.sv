// fft_pkg: types and constants shared by the reconfigurable radix-2 FFT processor.
//
// Samples, twiddle factors and results are signed 16-bit fixed-point numbers with 10
// fractional bits (Q5.10), as the design specifies for its input, coefficient and output
// words. A complex word is 32 bits (real in the upper half, imaginary in the lower), the
// word width of every data and coefficient memory module. The largest transform is
// 2**MAX_LOG2N = 1024 points: two data memory clusters of 512 words hold it, addressed by
// 9-bit in-cluster addresses; the coefficient cluster holds the 512 twiddle factors it needs.
// The smallest transform is 16 points.
package fft_pkg;

  localparam int unsigned DW        = 16;  // bits per real or imaginary part
  localparam int unsigned FRAC      = 10;  // fractional bits of the Q5.10 format
  localparam int unsigned MAX_LOG2N = 10;  // largest transform: 1024 points
  localparam int unsigned MIN_LOG2N = 4;   // smallest transform: 16 points
  localparam int unsigned MOD_WORDS = 8;   // words per memory module (DMM or CMM)
  localparam int unsigned N_MODS    = 64;  // memory modules per cluster

  typedef logic signed [DW-1:0] sample_t;

  typedef struct packed {
    sample_t re;
    sample_t im;
  } cplx_t;

endpackage
