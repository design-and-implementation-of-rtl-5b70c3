// key_expansion: AES key schedule with round-key storage.
//
// A pulse on load captures the NK-word cipher key into words w[0..NK-1];
// then one further word is generated per clock,
//   w[i] = w[i-NK] ^ SubWord(RotWord(w[i-1])) ^ Rcon   when i mod NK = 0
//   w[i] = w[i-NK] ^ SubWord(w[i-1])                   when NK = 8, i mod NK = 4
//   w[i] = w[i-NK] ^ w[i-1]                            otherwise,
// until all 4*(NR+1) words are held (40 clocks after load for a 128-bit
// key, 46 for 192, 52 for 256).  ready then rises and stays high until the
// next load.  Round key r is words 4r..4r+3, read combinationally through
// rk_idx/rk at any time (valid once ready is high).  The round constant is
// kept in a register and doubled in GF(2^8) each time it is used.
//
//   NK      : key length in 32-bit words, 4, 6 or 8 (default 4: AES-128)
//   load    : starts expansion of key (key[32*NK-1:32*NK-32] is w[0])
//   ready   : all round keys are valid
//   rk_idx  : round-key number 0..NR
//   rk      : round key rk_idx, w[4r] in the most significant word (zero
//             for rk_idx > NR)
// Reset (rst_n low, asynchronous) clears ready.
//
// The recurrence is the AES standard's; one word per clock, the stored
// round keys, the load/ready handshake and the reset are this design's own.
module key_expansion
  import aes_pkg::*;
#(
  parameter int unsigned NK = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               load,
  input  logic [32*NK-1:0]   key,
  output logic               ready,
  input  logic [3:0]         rk_idx,
  output logic [127:0]       rk
);

  localparam int unsigned NR = NK + 6;
  localparam int unsigned NW = 4 * (NR + 1);

  initial assert (NK == 4 || NK == 6 || NK == 8)
    else $error("key_expansion: NK must be 4, 6 or 8");

  word_t                 w [NW];
  logic [5:0]            idx;           // next word to generate
  logic [3:0]            pos;           // idx mod NK
  byte_t                 rcon;
  logic                  busy;

  word_t                 prev, sub_in, sub_out, temp, next_word;

  assign prev   = w[idx - 6'd1];
  assign sub_in = (pos == 4'd0) ? {prev[23:0], prev[31:24]} : prev;   // RotWord

  for (genvar j = 0; j < 4; j++) begin : g_sbox
    aes_sbox u_sbox (.x(sub_in[8*j +: 8]), .inv(1'b0), .y(sub_out[8*j +: 8]));
  end

  always_comb begin
    if (pos == 4'd0)                 temp = sub_out ^ {rcon, 24'h0};
    else if (NK > 6 && pos == 4'd4)  temp = sub_out;
    else                             temp = prev;
    next_word = w[idx - 6'(NK)] ^ temp;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      ready <= 1'b0;
      idx   <= '0;
      pos   <= '0;
      rcon  <= 8'h01;
    end else if (load) begin
      busy  <= 1'b1;
      ready <= 1'b0;
      idx   <= 6'(NK);
      pos   <= '0;
      rcon  <= 8'h01;
    end else if (busy) begin
      if (pos == 4'(NK - 1)) pos <= '0;
      else                   pos <= pos + 4'd1;
      if (pos == 4'd0) rcon <= xtime(rcon);
      idx <= idx + 6'd1;
      if (idx == 6'(NW - 1)) begin
        busy  <= 1'b0;
        ready <= 1'b1;
      end
    end
  end

  // Word storage: no reset needed, ready guards every read.
  always_ff @(posedge clk) begin
    if (load) begin
      for (int i = 0; i < int'(NK); i++)
        w[i] <= key[32*(int'(NK) - 1 - i) +: 32];
    end else if (busy) begin
      w[idx] <= next_word;
    end
  end

  // Indices above NR read as zero.
  always_comb begin
    if (rk_idx > 4'(NR)) rk = '0;
    else rk = {w[4*rk_idx], w[4*rk_idx + 1], w[4*rk_idx + 2], w[4*rk_idx + 3]};
  end

endmodule
