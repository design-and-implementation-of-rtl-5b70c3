// shift_rows: AES ShiftRows (inv = 0) or InvShiftRows (inv = 1).
//
// Row r of the 4x4 state array is rotated cyclically by r byte positions:
// to the left for encryption, to the right for decryption.  Row 0 is left
// unchanged.  Only wiring and a 2:1 multiplexer per byte.
//
//   din  : state in AES byte order (byte r + 4c holds row r, column c)
//   inv  : 0 = rotate left, 1 = rotate right
//   dout : shifted state
//
// Rotation by r follows the AES standard (the design description speaks of
// a one-position shift); the inverse direction is this design's addition.
module shift_rows
  import aes_pkg::*;
(
  input  state_t din,
  input  logic   inv,
  output state_t dout
);

  for (genvar r = 0; r < 4; r++) begin : g_row
    for (genvar c = 0; c < 4; c++) begin : g_col
      assign dout[r + 4*c] = inv ? din[r + 4*((c + 4 - r) % 4)]
                                 : din[r + 4*((c + r) % 4)];
    end
  end

endmodule
