// vedic_mul4: 4 x 4 unsigned multiplier by the Urdhva-Tiryakbhyam
// ("vertical and crosswise") method.
//
// The product is formed column by column, as the vertical-and-crosswise
// procedure describes: column 0 is the vertical product of the two LSBs;
// column 1 adds the two crosswise products of the adjacent bits and the carry
// from column 0; and so on up to column 6, the vertical product of the two
// MSBs. The LSB of each column sum is product bit k and the rest of the sum is
// carried into column k+1. All bit products are formed at once, so the delay
// is that of the carry chain through the column adders, as in an array
// multiplier. A column can hold four products plus a carry, so the carry is
// kept as a small multi-bit value (the method's "carry bit" generalised).
//
// Interface: a, b (4 bits each) in, p (8 bits) out. Purely combinational.
module vedic_mul4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);

  always_comb begin
    logic [3:0] col;    // column sum, at most 4 products + carry 3 = 7
    logic [2:0] carry;  // carry into the next column
    carry = '0;
    p     = '0;
    for (int k = 0; k < 7; k++) begin
      col = {1'b0, carry};
      for (int i = 0; i < 4; i++) begin
        if (k - i >= 0 && k - i < 4) col = col + 4'(a[i] & b[k-i]);
      end
      p[k]  = col[0];
      carry = col[3:1];
    end
    p[7] = carry[0];
  end

endmodule
