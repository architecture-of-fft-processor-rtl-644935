// radix2_butterfly: radix-2 decimation-in-time butterfly.
//
// y0 = a + w*b and y1 = a - w*b, where the twiddle product w*b comes from the
// Vedic complex multiplier (cmul_vedic). No scaling is applied; the caller
// must size DATA_W for the growth of one bit per stage. Combinational: the
// controller issues one butterfly per clock and the memory captures the
// results at the clock edge.
//
// Interface: a, b (cplx_t), w (twiddle_t) in; y0, y1 (cplx_t) out.
module radix2_butterfly
  import fft_pkg::*;
(
  input  cplx_t    a,
  input  cplx_t    b,
  input  twiddle_t w,
  output cplx_t    y0,
  output cplx_t    y1
);

  cplx_t wb;

  cmul_vedic u_cmul (.b(b), .w(w), .p(wb));

  always_comb begin
    y0.re = a.re + wb.re;
    y0.im = a.im + wb.im;
    y1.re = a.re - wb.re;
    y1.im = a.im - wb.im;
  end

endmodule
