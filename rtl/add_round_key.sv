// add_round_key: AES AddRoundKey, the bitwise XOR of the 128-bit state with
// the 128-bit round key.  Purely combinational; it is its own inverse, so
// the same block serves encryption and decryption.
//
//   din  : state
//   rk   : round key, same byte order as the state
//   dout : din ^ rk
//
// Follows the design description directly.
module add_round_key
  import aes_pkg::*;
(
  input  state_t din,
  input  state_t rk,
  output state_t dout
);

  assign dout = din ^ rk;

endmodule
