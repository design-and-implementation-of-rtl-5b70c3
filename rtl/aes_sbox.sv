// aes_sbox: one AES substitution box, forward or inverse.
//
// Two 256-entry read-only tables are held as constant arrays: the forward
// S-box (multiplicative inverse in GF(2^8) followed by the AES affine map)
// and its inverse permutation, which is the table used for decryption.  Both
// are computed at elaboration by aes_pkg rather than typed in.  The byte is
// looked up in one or the other according to inv.  Purely combinational.
//
//   x   : input byte
//   inv : 0 = S-box (encryption), 1 = inverse S-box (decryption)
//   y   : substituted byte
//
// The inverse table is the one the design lists for decryption; the forward
// table and computing both at elaboration are this design's choices, taken
// from the AES standard.
module aes_sbox
  import aes_pkg::*;
(
  input  logic [7:0] x,
  input  logic       inv,
  output logic [7:0] y
);

  localparam table_t SBOX     = gen_sbox();
  localparam table_t INV_SBOX = gen_inv_sbox();

  assign y = inv ? INV_SBOX[x] : SBOX[x];

endmodule
