// mix_columns: AES MixColumns (inv = 0) or InvMixColumns (inv = 1) on the
// whole 128-bit state, with every field product formed by a Vedic
// multiplier rather than a lookup table.
//
// Each state column s = (s0, s1, s2, s3) is replaced by M * s, where M is the
// encryption matrix [2 3 1 1; 1 2 3 1; 1 1 2 3; 3 1 1 2] or the decryption
// matrix [E B D 9; 9 E B D; D 9 E B; B D 9 E].  Because the same general
// multiplier serves both, the coefficient fed to each of the 64 gf_vedic_mul8
// instances is simply switched by inv.  Purely combinational.
//
//   din  : state in AES byte order (byte r + 4c holds row r, column c)
//   inv  : 0 = MixColumns, 1 = InvMixColumns
//   dout : transformed state
//
// The matrices and the use of one general multiplier for both directions
// follow the design description; the column orientation is the AES
// standard's.
module mix_columns
  import aes_pkg::*;
(
  input  state_t din,
  input  logic   inv,
  output state_t dout
);

  coef_mat_t  m;
  logic [7:0] prod [4][4][4];           // [column][row][term]

  assign m = inv ? MAT_DEC : MAT_ENC;

  for (genvar c = 0; c < 4; c++) begin : g_col
    for (genvar r = 0; r < 4; r++) begin : g_row
      for (genvar k = 0; k < 4; k++) begin : g_term
        gf_vedic_mul8 u_mul (.a(m[r][k]), .b(din[4*c + k]), .p(prod[c][r][k]));
      end
      assign dout[4*c + r] = prod[c][r][0] ^ prod[c][r][1]
                           ^ prod[c][r][2] ^ prod[c][r][3];
    end
  end

endmodule
