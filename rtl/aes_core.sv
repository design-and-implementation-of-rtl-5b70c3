// aes_core: iterative AES block cipher, one round per clock, encryption and
// decryption, whose mix-column step uses Vedic GF(2^8) multipliers.
//
// The state array register is loaded with the input block XORed with the
// first round key, then passed NR times through the combinational aes_round
// (sub-bytes, shift-rows, mix-column, add-round-key), the last pass without
// the mix-column step.  Round keys come from key_expansion, which holds all
// NR+1 of them, so decryption simply walks them in reverse order.
//
// Interface and timing:
//   key_load  one-cycle pulse: expand key; key_ready rises 4*NR+4-NK clocks
//             later (40 for AES-128)
//   start     accepted when ready is high; din and decrypt are sampled then
//   done      one-cycle pulse NR+1 clocks after start (11 for AES-128);
//             dout holds the result until the next start
//   ready     key expanded and no block in flight
// KEY_BITS (128, 192 or 256) sets NK = KEY_BITS/32 and NR = NK+6.
// Reset (rst_n low) is asynchronous.
//
// The state-array loop and the 128-bit default key follow the design
// description; one round per clock, the handshake and the reset are this
// design's own choices.
module aes_core
  import aes_pkg::*;
#(
  parameter int unsigned KEY_BITS = 128
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 key_load,
  input  logic [KEY_BITS-1:0]  key,
  output logic                 key_ready,
  input  logic                 start,
  input  logic                 decrypt,
  input  logic [127:0]         din,
  output logic                 ready,
  output logic                 done,
  output logic [127:0]         dout
);

  localparam int unsigned NK = KEY_BITS / 32;
  localparam int unsigned NR = NK + 6;

  state_t      state_q, round_out, init_out;
  logic [3:0]  round_q;                 // round being computed, 1..NR
  logic        busy_q, inv_q;
  logic [3:0]  rk_idx;
  logic [127:0] rk;

  key_expansion #(.NK(NK)) u_keys (
    .clk, .rst_n, .load(key_load), .key, .ready(key_ready),
    .rk_idx, .rk
  );

  // Round-key selection: key 0 / key NR for the initial addition, then
  // ascending for encryption and descending for decryption.
  always_comb begin
    if (!busy_q) rk_idx = decrypt ? 4'(NR) : 4'd0;
    else         rk_idx = inv_q ? 4'(NR) - round_q : round_q;
  end

  add_round_key u_init (.din(state_t'(din)), .rk(state_t'(rk)), .dout(init_out));

  aes_round u_round (
    .din(state_q), .rk(state_t'(rk)), .inv(inv_q),
    .last(round_q == 4'(NR)), .dout(round_out)
  );

  assign ready = key_ready && !busy_q && !key_load;
  assign dout  = 128'(state_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= '0;
      round_q <= '0;
      busy_q  <= 1'b0;
      inv_q   <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy_q) begin
        if (start && ready) begin
          state_q <= init_out;
          inv_q   <= decrypt;
          round_q <= 4'd1;
          busy_q  <= 1'b1;
        end
      end else begin
        state_q <= round_out;
        round_q <= round_q + 4'd1;
        if (round_q == 4'(NR)) begin
          busy_q <= 1'b0;
          done   <= 1'b1;
        end
      end
    end
  end

  // done is a single-cycle pulse.
  assert property (@(posedge clk) disable iff (!rst_n) done |=> !done);

endmodule
