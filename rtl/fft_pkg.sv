// fft_pkg: shared types and constants of the 4-point Vedic FFT processor.
//
// Data words are complex numbers with two's-complement real and imaginary
// parts of DATA_W bits. Input samples are unsigned 8-bit numbers with four
// fraction bits (value = code / 16), as the sample codes shown by the host
// software imply; inside the core they are kept as integers, so the FFT
// results carry the same four fraction bits. Twiddle factors use TW_W-bit
// two's complement with TW_FRAC fraction bits, so +1.0 is 64 and -1.0 is -64.
// The widths are this design's own choice: 12 bits hold the 2-bit growth of
// two radix-2 stages applied to a 9-bit signed input without scaling.
package fft_pkg;

  localparam int unsigned N_POINTS = 4;   // transform length
  localparam int unsigned ADDR_W   = 2;   // data memory address width
  localparam int unsigned DATA_W   = 12;  // internal real/imag width
  localparam int unsigned TW_W     = 8;   // twiddle real/imag width
  localparam int unsigned TW_FRAC  = 6;   // twiddle fraction bits
  localparam int unsigned MULT_W   = 16;  // Vedic multiplier operand width

  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic signed [TW_W-1:0]   tw_t;

  typedef struct packed {
    data_t re;
    data_t im;
  } cplx_t;

  typedef struct packed {
    tw_t re;
    tw_t im;
  } twiddle_t;

  // Reverse the ADDR_W bits of an index (input ordering of a DIT FFT).
  function automatic logic [ADDR_W-1:0] bitrev(input logic [ADDR_W-1:0] a);
    logic [ADDR_W-1:0] r;
    for (int i = 0; i < ADDR_W; i++) r[i] = a[ADDR_W-1-i];
    return r;
  endfunction

endpackage
