// aes_round: one combinational AES round, encryption or decryption, as the
// loop of sub-bytes, shift-rows, mix-column and add-round-key steps.
//
//   encryption (inv = 0): dout = AddRoundKey(MixColumns(ShiftRows(SubBytes(din))))
//   decryption (inv = 1): dout = InvMixColumns(AddRoundKey(InvSubBytes(InvShiftRows(din))))
//
// With last = 1 the mix-column step is left out, as in the final AES round.
// Byte substitution and row rotation commute, so both directions run
// sub_bytes before shift_rows.  Decryption is the straightforward inverse
// cipher, the round keys being applied in reverse order by the controller.
//
//   din  : state entering the round
//   rk   : round key for this round
//   inv  : 0 = encrypt, 1 = decrypt
//   last : 1 in the final round (no mix-column step)
//   dout : state leaving the round
//
// The step order follows the round diagram of the design; omitting the
// mix-column step in the last round and the decryption round follow the
// AES standard.
module aes_round
  import aes_pkg::*;
(
  input  state_t din,
  input  state_t rk,
  input  logic   inv,
  input  logic   last,
  output state_t dout
);

  state_t sb_out, sr_out, dec_ark, mc_in, mc_out, enc_ark_in, enc_out;

  sub_bytes     u_sb  (.din(din),    .inv(inv), .dout(sb_out));
  shift_rows    u_sr  (.din(sb_out), .inv(inv), .dout(sr_out));

  // Decryption adds the round key before the inverse mix-column step.
  add_round_key u_ark_dec (.din(sr_out), .rk(rk), .dout(dec_ark));

  assign mc_in = inv ? dec_ark : sr_out;
  mix_columns   u_mc  (.din(mc_in), .inv(inv), .dout(mc_out));

  // Encryption adds the round key after the mix-column step.
  assign enc_ark_in = last ? sr_out : mc_out;
  add_round_key u_ark_enc (.din(enc_ark_in), .rk(rk), .dout(enc_out));

  always_comb begin
    if (!inv)     dout = enc_out;
    else if (last) dout = dec_ark;
    else          dout = mc_out;
  end

endmodule
