// cmul_vedic: complex twiddle-factor multiplier built from Vedic multipliers.
//
// p = b * w = (br*wr - bi*wi) + j(br*wi + bi*wr). The four real products are
// formed concurrently by four signed Vedic multipliers (vedic_smul, each an
// Urdhva-Tiryakbhyam array), then summed and shifted right by the twiddle's
// TW_FRAC fraction bits (arithmetic shift, truncating). For the twiddles of a
// 4-point transform (1 and -j) the result is exact. Using the Vedic method for
// the twiddle products follows the source design; the four-multiplier form,
// the widths and the truncation are this design's choices.
//
// Interface: b (cplx_t), w (twiddle_t) in; p (cplx_t) out. Combinational.
module cmul_vedic
  import fft_pkg::*;
#(
  parameter int unsigned MUL_W = fft_pkg::MULT_W
) (
  input  cplx_t    b,
  input  twiddle_t w,
  output cplx_t    p
);

  localparam int unsigned PW = DATA_W + TW_W;

  logic signed [PW-1:0] rr, ii, ri, ir;
  logic signed [PW:0]   sum_re, sum_im;

  vedic_smul #(.AW(DATA_W), .BW(TW_W), .MULT_W(MUL_W)) u_rr (.a(b.re), .b(w.re), .p(rr));
  vedic_smul #(.AW(DATA_W), .BW(TW_W), .MULT_W(MUL_W)) u_ii (.a(b.im), .b(w.im), .p(ii));
  vedic_smul #(.AW(DATA_W), .BW(TW_W), .MULT_W(MUL_W)) u_ri (.a(b.re), .b(w.im), .p(ri));
  vedic_smul #(.AW(DATA_W), .BW(TW_W), .MULT_W(MUL_W)) u_ir (.a(b.im), .b(w.re), .p(ir));

  always_comb begin
    sum_re = (PW+1)'(rr) - (PW+1)'(ii);
    sum_im = (PW+1)'(ri) + (PW+1)'(ir);
    p.re   = DATA_W'(sum_re >>> TW_FRAC);
    p.im   = DATA_W'(sum_im >>> TW_FRAC);
  end

endmodule
