// vedic_smul: signed (two's complement) multiplier around the unsigned
// Vedic N x N array.
//
// The magnitudes of both operands are multiplied by vedic_mul_nxn and the
// product is negated when the operand signs differ. Sign-magnitude handling
// is this design's choice; the Vedic array itself is unsigned.
//
// Interface: a (AW bits, signed), b (BW bits, signed) in; p (AW+BW bits,
// signed) out. AW and BW must not exceed MULT_W. Purely combinational.
module vedic_smul #(
  parameter int unsigned AW     = 12,
  parameter int unsigned BW     = 8,
  parameter int unsigned MULT_W = 16
) (
  input  logic signed [AW-1:0]    a,
  input  logic signed [BW-1:0]    b,
  output logic signed [AW+BW-1:0] p
);

  logic [MULT_W-1:0]   mag_a, mag_b;
  logic [2*MULT_W-1:0] mag_p;
  logic                neg;

  always_comb begin
    mag_a = a[AW-1] ? -MULT_W'(a) : MULT_W'(a);
    mag_b = b[BW-1] ? -MULT_W'(b) : MULT_W'(b);
    neg   = a[AW-1] ^ b[BW-1];
  end

  vedic_mul_nxn #(.N(MULT_W)) u_mul (.a(mag_a), .b(mag_b), .p(mag_p));

  // Only the low AW+BW bits of the 2*MULT_W-bit array product can be
  // non-zero, since |a| <= 2^(AW-1) and |b| <= 2^(BW-1).
  assign p = neg ? -$signed((AW+BW)'(mag_p)) : $signed((AW+BW)'(mag_p));

endmodule
