// tb_aes_vedic_top: end-to-end test of the top at its default parameters
// (AES-128).  Loads keys, encrypts and decrypts blocks (the AES
// specification's example and random blocks against the reference model),
// and drives the stand-alone matrix unit with both coefficient matrices.
// Counts each mechanism of the design and fails if one never happened: key
// expansion, encryption, decryption, a final round without mix-column, a
// start ignored while the core was not ready, and both matrix modes.
// Latencies are checked: 40 clocks to expand a key, 11 from start to done.
module tb_aes_vedic_top;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, key_load = 0, start = 0, decrypt = 0;
  logic [127:0] key, din, dout;
  logic key_ready, ready, done;
  logic [0:15][7:0] mat_a, mat_p;
  logic mat_inv;
  int checks = 0, failures = 0;
  int n_keyexp = 0, n_enc = 0, n_dec = 0, n_last = 0, n_ignored = 0, n_mat_enc = 0, n_mat_dec = 0;

  always #5 clk = ~clk;

  aes_vedic_top dut (
    .clk, .rst_n, .key_load, .key, .key_ready, .start, .decrypt, .din,
    .ready, .done, .dout, .mat_a, .mat_inv, .mat_p
  );

  // Final rounds: a clock edge with the round logic in its last-round form
  // while the core is busy.
  always @(posedge clk)
    if (rst_n && !ready && key_ready && dut.u_aes.u_round.last) n_last++;
  always @(posedge clk)
    if (rst_n && start && !ready) n_ignored++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: %h expected %h", what, got, exp);
    end
  endtask

  task automatic load_key(logic [127:0] k);
    int c = 0;
    @(negedge clk);
    key = k; key_load = 1;
    @(negedge clk);
    key_load = 0;
    while (!key_ready) begin c++; @(negedge clk); end
    n_keyexp++;
    checks++;
    if (c != 40) begin failures++; $display("FAIL key expansion took %0d", c); end
  endtask

  task automatic block(logic [127:0] x, bit dec, output logic [127:0] y);
    int c = 0;
    @(negedge clk);
    din = x; decrypt = dec; start = 1;
    @(negedge clk);
    // Keep start high one more clock: the core is busy and must ignore it.
    din = ~x;
    @(negedge clk);
    start = 0;
    c = 2;
    while (!done) begin c++; @(negedge clk); end
    y = dout;
    if (dec) n_dec++; else n_enc++;
    checks++;
    if (c != 11) begin failures++; $display("FAIL latency %0d", c); end
  endtask

  task automatic matrix(logic [0:15][7:0] x, bit inv);
    logic [0:15][7:0] e;
    mat_a = x; mat_inv = inv; #1;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) begin
        e[4*r + c] = 0;
        for (int k = 0; k < 4; k++)
          e[4*r + c] ^= gmul(x[4*r + k], inv ? 8'({8'h0e, 8'h0b, 8'h0d, 8'h09} >> (8*(3 - ((c - k + 4) % 4))))
                                               : 8'({8'h02, 8'h03, 8'h01, 8'h01} >> (8*(3 - ((c - k + 4) % 4)))));
      end
    checks++;
    if (mat_p !== e) begin failures++; $display("FAIL matrix %h inv=%0d: %h exp %h", x, inv, mat_p, e); end
    if (inv) n_mat_dec++; else n_mat_enc++;
  endtask

  initial begin
    logic [127:0] k, pt, ct, y;
    logic [0:15][7:0] m;
    key = '0; din = '0; mat_a = '0; mat_inv = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // A start before any key is loaded is ignored.
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    checks++;
    if (done) failures++;

    load_key(128'h2b7e1516_28aed2a6_abf71588_09cf4f3c);
    block(128'h3243f6a8_885a308d_313198a2_e0370734, 0, y);
    expect_eq("encrypt", y, 128'h3925841d_02dc09fb_dc118597_196a0b32);
    block(y, 1, y);
    expect_eq("decrypt", y, 128'h3243f6a8_885a308d_313198a2_e0370734);

    for (int n = 0; n < 3; n++) begin
      k = {$urandom, $urandom, $urandom, $urandom};
      load_key(k);
      for (int j = 0; j < 3; j++) begin
        pt = {$urandom, $urandom, $urandom, $urandom};
        block(pt, 0, ct);
        expect_eq("encrypt random", ct, encrypt({k, 128'h0}, 4, pt));
        block(ct, 1, y);
        expect_eq("round trip", y, pt);
      end
    end

    for (int i = 0; i < 16; i++) m[i] = 8'(i + 1);
    matrix(m, 0);
    checks++;
    if (mat_p[0] !== 8'd15 || mat_p[15] !== 8'd50) failures++;
    for (int n = 0; n < 50; n++) begin
      for (int i = 0; i < 16; i++) m[i] = 8'($urandom);
      matrix(m, n[0]);
    end

    $display("mechanisms: key expansions %0d, encryptions %0d, decryptions %0d, final rounds %0d, ignored starts %0d, matrix enc %0d, matrix dec %0d",
             n_keyexp, n_enc, n_dec, n_last, n_ignored, n_mat_enc, n_mat_dec);
    checks += 7;
    if (n_keyexp == 0) failures++;
    if (n_enc == 0) failures++;
    if (n_dec == 0) failures++;
    if (n_last != n_enc + n_dec) failures++;
    if (n_ignored == 0) failures++;
    if (n_mat_enc == 0) failures++;
    if (n_mat_dec == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
