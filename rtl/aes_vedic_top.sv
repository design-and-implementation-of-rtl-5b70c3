// aes_vedic_top: AES block cipher whose mix-column multiplications are done
// by Vedic (Urdhva Tiryakbhyam) GF(2^8) multipliers, shown beside the
// stand-alone 4x4 matrix unit on which that multiplication was demonstrated.
//
// u_aes is the iterative cipher (aes_core): load a key, then start one
// 128-bit block at a time in either direction; see aes_core for timing.
// u_matrix is comb_vedic, the combinational 16-byte x coefficient-matrix
// product; its ports are brought out unchanged and it shares no logic with
// the cipher.
//
// KEY_BITS selects AES-128 (default), AES-192 or AES-256.
//
// Placing the matrix unit beside the cipher rather than inside it is this
// design's choice, because that unit multiplies from the right.
module aes_vedic_top #(
  parameter int unsigned KEY_BITS = 128
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // cipher
  input  logic                 key_load,
  input  logic [KEY_BITS-1:0]  key,
  output logic                 key_ready,
  input  logic                 start,
  input  logic                 decrypt,
  input  logic [127:0]         din,
  output logic                 ready,
  output logic                 done,
  output logic [127:0]         dout,
  // stand-alone matrix unit
  input  logic [0:15][7:0]     mat_a,
  input  logic                 mat_inv,
  output logic [0:15][7:0]     mat_p
);

  aes_core #(.KEY_BITS(KEY_BITS)) u_aes (
    .clk, .rst_n, .key_load, .key, .key_ready,
    .start, .decrypt, .din, .ready, .done, .dout
  );

  comb_vedic u_matrix (.a(mat_a), .inv(mat_inv), .p(mat_p));

endmodule
