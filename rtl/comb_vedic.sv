// comb_vedic: combinational 4x4 byte-matrix product over GF(2^8) with the
// mix-column coefficient matrix, every product formed by a Vedic multiplier.
//
// The sixteen input bytes a1..a16 are read row by row as a 4x4 matrix X
// (a1..a4 is the first row) and the outputs p1..p16 are the matrix
// P = X * C, row by row, where C is the encryption matrix
// [2 3 1 1; 1 2 3 1; 1 1 2 3; 3 1 1 2] or, with inv = 1, the decryption
// matrix [E B D 9; 9 E B D; D 9 E B; B D 9 E].  Each output byte is the XOR of
// four gf_vedic_mul8 products, 64 multipliers in all.  With a1..a16 = 1..16
// and inv = 0 the outputs are 15, 0, 5, 14, 19, 12, 9, 26, 7, 8, 13, 6, 43,
// 20, 17, 50 (decimal).  Note that C multiplies from the right here; the
// cipher's column transform (mix_columns) multiplies from the left.
//
//   a   : a[0] = a1 ... a[15] = a16
//   inv : 0 selects the encryption matrix, 1 the decryption matrix
//   p   : p[0] = p1 ... p[15] = p16
// Purely combinational.
//
// The unit, its port names and its example values follow the original
// demonstration of the design; the inv select is this design's addition.
module comb_vedic
  import aes_pkg::*;
(
  input  logic [0:15][7:0] a,
  input  logic             inv,
  output logic [0:15][7:0] p
);

  coef_mat_t       c;
  logic [7:0]      prod [4][4][4];      // [row][col][term]

  assign c = inv ? MAT_DEC : MAT_ENC;

  for (genvar r = 0; r < 4; r++) begin : g_row
    for (genvar col = 0; col < 4; col++) begin : g_col
      for (genvar k = 0; k < 4; k++) begin : g_term
        gf_vedic_mul8 u_mul (.a(a[4*r + k]), .b(c[k][col]), .p(prod[r][col][k]));
      end
      assign p[4*r + col] = prod[r][col][0] ^ prod[r][col][1]
                          ^ prod[r][col][2] ^ prod[r][col][3];
    end
  end

endmodule
