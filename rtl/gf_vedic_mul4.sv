// gf_vedic_mul4: 4x4-bit Urdhva Tiryakbhyam ("vertically and crosswise")
// multiplier over GF(2), i.e. a carry-free polynomial product.
//
// Product bit k is formed in step k+1 of the sutra: every pair a[i], b[j]
// with i + j = k is ANDed and the partial products of that column are
// combined by XOR instead of addition, so no carries pass between columns.
// Step 1 is a0*b0, step 4 the full four-term cross a0b3..a3b0, step 7 a3*b3,
// giving a 7-bit product.  Purely combinational.
//
//   a, b : 4-bit operands (polynomial coefficients, bit 0 = x^0)
//   p    : 7-bit carry-free product
//
// The seven-step column structure and the AND/XOR combination follow the
// Vedic method as described for this design; being combinational is this
// design's choice.
module gf_vedic_mul4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [6:0] p
);

  always_comb begin
    p = '0;
    for (int k = 0; k < 7; k++)           // one sutra step per column
      for (int i = 0; i < 4; i++)
        if (k - i >= 0 && k - i < 4)
          p[k] = p[k] ^ (a[i] & b[k - i]);
  end

endmodule
