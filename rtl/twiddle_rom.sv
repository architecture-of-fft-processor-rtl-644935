// twiddle_rom: twiddle factors W_4^k = cos(2*pi*k/4) - j*sin(2*pi*k/4) of the
// 4-point FFT, for k = 0 and 1, in the fft_pkg twiddle format.
//
// W^0 = 1 and W^1 = -j, that is (64, 0) and (0, -64) with six fraction bits.
// The values follow from the DFT definition; the width of the entries is this
// design's choice. The table is combinational (a two-entry ROM).
//
// Interface: idx (twiddle exponent k, 1 bit) in; w (twiddle_t) out.
module twiddle_rom
  import fft_pkg::*;
(
  input  logic     idx,
  output twiddle_t w
);

  localparam int ONE = 1 << TW_FRAC;

  always_comb begin
    if (idx) w = '{re: tw_t'(0),   im: tw_t'(-ONE)};
    else     w = '{re: tw_t'(ONE), im: tw_t'(0)};
  end

endmodule
