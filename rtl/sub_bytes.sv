// sub_bytes: AES SubBytes (inv = 0) or InvSubBytes (inv = 1) on all sixteen
// state bytes at once, one aes_sbox per byte.  Purely combinational.
//
//   din  : 128-bit state
//   inv  : 0 = S-box, 1 = inverse S-box
//   dout : substituted state
//
// Byte-by-byte substitution follows the design description; using sixteen
// parallel boxes is this design's choice.
module sub_bytes
  import aes_pkg::*;
(
  input  state_t din,
  input  logic   inv,
  output state_t dout
);

  for (genvar i = 0; i < 16; i++) begin : g_byte
    aes_sbox u_sbox (.x(din[i]), .inv(inv), .y(dout[i]));
  end

endmodule
