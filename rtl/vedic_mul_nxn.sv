// vedic_mul_nxn: unsigned N x N Urdhva-Tiryakbhyam multiplier built from
// 4 x 4 Vedic blocks.
//
// The operands are cut into D = N/4 four-bit digits, a = {a[D-1] .. a[0]} and
// likewise b. Every digit pair a[i] * b[j] is multiplied at once by its own
// 4 x 4 Vedic block (vedic_mul4), D*D blocks in all: sixteen for N = 16.
// The vertical-and-crosswise rule is then applied one level up, in base 16:
// column c collects the products with i + j = c (the vertical product for
// c = 0, the crosswise products of adjacent digits for c = 1, and so on), and
// the columns are added with their weights 16^c. Reducing N x N to 4 x 4
// blocks follows the method; the adder arrangement (a plain sum of the
// weighted columns, left to synthesis) is this design's choice.
//
// Interface: a, b (N bits) in, p (2N bits) out. Purely combinational.
// N must be a multiple of 4.
module vedic_mul_nxn #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  localparam int unsigned D = N / 4;

  logic [7:0] tile [D][D];   // tile[i][j] = a digit i * b digit j

  for (genvar i = 0; i < D; i++) begin : g_row
    for (genvar j = 0; j < D; j++) begin : g_col
      vedic_mul4 u_mul4 (.a(a[4*i +: 4]), .b(b[4*j +: 4]), .p(tile[i][j]));
    end
  end

  always_comb begin
    p = '0;
    for (int c = 0; c < 2 * D - 1; c++) begin
      for (int i = 0; i < D; i++) begin
        if (c - i >= 0 && c - i < D) p = p + ((2*N)'(tile[i][c-i]) << (4 * c));
      end
    end
  end

endmodule
