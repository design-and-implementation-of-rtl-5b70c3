// aes_pkg: types, constants and elaboration-time table generators shared by
// the AES datapath.
//
// The 128-bit state follows the usual AES byte order: byte 0 is the most
// significant byte of the 128-bit word and the bytes fill the 4x4 state array
// column by column, so state[r][c] is byte r + 4*c.  The state is kept as a
// packed array of 16 bytes indexed 0..15 from the most significant end.
//
// The field is GF(2^8) with the AES polynomial x^8 + x^4 + x^3 + x + 1.  The
// S-box tables are not typed in: they are computed when the design is
// elaborated, from the multiplicative inverse in the field followed by the
// AES affine map, using the exponential/logarithm tables of generator 03.
// These functions only build constant tables; the datapath multiplications
// are done by the Vedic multiplier modules.
package aes_pkg;

  typedef logic [7:0]        byte_t;
  typedef logic [31:0]       word_t;
  typedef logic [0:15][7:0]  state_t;   // element 0 = most significant byte


  // Mix-column coefficient matrices: A for encryption, B for decryption.
  typedef logic [0:3][0:3][7:0] coef_mat_t;
  localparam coef_mat_t MAT_ENC = '{'{8'h02, 8'h03, 8'h01, 8'h01},
                                    '{8'h01, 8'h02, 8'h03, 8'h01},
                                    '{8'h01, 8'h01, 8'h02, 8'h03},
                                    '{8'h03, 8'h01, 8'h01, 8'h02}};
  localparam coef_mat_t MAT_DEC = '{'{8'h0e, 8'h0b, 8'h0d, 8'h09},
                                    '{8'h09, 8'h0e, 8'h0b, 8'h0d},
                                    '{8'h0d, 8'h09, 8'h0e, 8'h0b},
                                    '{8'h0b, 8'h0d, 8'h09, 8'h0e}};

  typedef logic [7:0] table_t [256];

  // Multiply by x (02) in GF(2^8).
  function automatic byte_t xtime(byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // AES affine map applied after inversion in the forward S-box.
  function automatic byte_t affine(byte_t b);
    byte_t r;
    for (int i = 0; i < 8; i++)
      r[i] = b[i] ^ b[(i + 4) % 8] ^ b[(i + 5) % 8] ^ b[(i + 6) % 8] ^ b[(i + 7) % 8];
    return r ^ 8'h63;
  endfunction

  // Forward S-box: S(x) = affine(x^-1), with 0^-1 taken as 0.
  // exp[i] = 03^i; the inverse of 03^i is 03^(255-i).
  function automatic table_t gen_sbox();
    table_t t;
    byte_t  e [256];
    byte_t  g;
    g = 8'h01;
    for (int i = 0; i < 256; i++) begin
      e[i] = g;
      g    = g ^ xtime(g);              // g * 03
    end
    t[0] = affine(8'h00);
    for (int i = 0; i < 255; i++)
      t[e[i]] = affine(e[(255 - i) % 255]);
    return t;
  endfunction

  // Inverse S-box: the inverse permutation of the forward table.
  function automatic table_t gen_inv_sbox();
    table_t s, t;
    s = gen_sbox();
    for (int i = 0; i < 256; i++)
      t[s[i]] = 8'(i);
    return t;
  endfunction

endpackage
