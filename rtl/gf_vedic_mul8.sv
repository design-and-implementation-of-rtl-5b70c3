// gf_vedic_mul8: GF(2^8) multiplier for AES built from the Vedic 4x4 block.
//
// The 8-bit operands are split into nibbles and the four nibble products
// aL*bL, aH*bL, aL*bH, aH*bH are formed by gf_vedic_mul4 instances (the
// larger multiplication is assembled from the small Vedic multiplier).  They
// are combined carry-free by XOR at their weights 1, x^4 and x^8 into a
// 15-bit polynomial, which is reduced modulo x^8 + x^4 + x^3 + x + 1 (11B)
// so the result stays within 8 bits.  Purely combinational.
//
//   a, b : field elements
//   p    : a * b in GF(2^8)
//
// Assembling the 8-bit product from 4-bit Vedic blocks follows the design
// description; the nibble split and the reduction polynomial (taken from the
// AES standard) are this design's choices.
module gf_vedic_mul8 (
  input  logic [7:0] a,
  input  logic [7:0] b,
  output logic [7:0] p
);

  logic [6:0]  p_ll, p_hl, p_lh, p_hh;
  logic [14:0] full;
  logic [14:0] red;

  gf_vedic_mul4 u_ll (.a(a[3:0]), .b(b[3:0]), .p(p_ll));
  gf_vedic_mul4 u_hl (.a(a[7:4]), .b(b[3:0]), .p(p_hl));
  gf_vedic_mul4 u_lh (.a(a[3:0]), .b(b[7:4]), .p(p_lh));
  gf_vedic_mul4 u_hh (.a(a[7:4]), .b(b[7:4]), .p(p_hh));

  assign full = {8'b0, p_ll} ^ {4'b0, p_hl ^ p_lh, 4'b0} ^ {p_hh, 8'b0};

  // Polynomial reduction, from the highest product bit down.
  always_comb begin
    red = full;
    for (int k = 14; k >= 8; k--)
      if (red[k]) red = red ^ (15'h11b << (k - 8));
  end

  assign p = red[7:0];

endmodule
