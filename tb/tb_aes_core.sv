// tb_aes_core: the iterative cipher with 128-, 192- and 256-bit keys, run in
// lockstep on the same (truncated) key and block.  Checks the known-answer
// vectors of the AES specification, random blocks against the reference
// model in both directions, the latency from start to done (NR+1 clocks),
// that done is a single pulse, and that a start is ignored while the key is
// still being expanded.
module tb_aes_core;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, key_load = 0, start = 0, decrypt = 0;
  logic [255:0] key;
  logic [127:0] din;
  logic [2:0]   key_ready, ready, done;
  logic [127:0] dout [3];
  int checks = 0, failures = 0;
  localparam int NKS [3] = '{4, 6, 8};

  always #5 clk = ~clk;

  aes_core            dut0 (.clk, .rst_n, .key_load, .key(key[255:128]), .key_ready(key_ready[0]),
                            .start, .decrypt, .din, .ready(ready[0]), .done(done[0]), .dout(dout[0]));
  aes_core #(.KEY_BITS(192)) dut1 (.clk, .rst_n, .key_load, .key(key[255:64]), .key_ready(key_ready[1]),
                            .start, .decrypt, .din, .ready(ready[1]), .done(done[1]), .dout(dout[1]));
  aes_core #(.KEY_BITS(256)) dut2 (.clk, .rst_n, .key_load, .key(key), .key_ready(key_ready[2]),
                            .start, .decrypt, .din, .ready(ready[2]), .done(done[2]), .dout(dout[2]));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_key(logic [255:0] k);
    @(negedge clk);
    key = k; key_load = 1;
    @(negedge clk);
    key_load = 0;
    // A start during expansion must be ignored.
    start = 1; din = '1;
    @(negedge clk);
    start = 0;
    checks++;
    if (done != 0 || ready != 0) failures++;
    while (key_ready != 3'b111) @(negedge clk);
    checks++;
    if (done != 0) failures++;
  endtask

  // Runs one block in all three cores; exp[i] = -1 means use the reference.
  task automatic run(logic [127:0] blk, bit dec, output logic [127:0] res [3]);
    int lat [3] = '{-1, -1, -1};
    int pulses [3] = '{0, 0, 0};
    @(negedge clk);
    din = blk; decrypt = dec; start = 1;
    @(negedge clk);
    start = 0; din = '0; decrypt = ~dec;      // inputs only matter at start
    for (int c = 1; c <= 20; c++) begin
      for (int i = 0; i < 3; i++)
        if (done[i]) begin
          pulses[i]++;
          if (lat[i] < 0) begin lat[i] = c; res[i] = dout[i]; end
        end
      @(negedge clk);
    end
    for (int i = 0; i < 3; i++) begin
      checks += 2;
      if (lat[i] != NKS[i] + 7) begin failures++; $display("FAIL core %0d latency %0d", i, lat[i]); end
      if (pulses[i] != 1) begin failures++; $display("FAIL core %0d %0d done pulses", i, pulses[i]); end
      checks++;
      if (dout[i] !== res[i]) failures++;       // result is held
    end
  endtask

  task automatic expect_eq(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    logic [127:0] r [3];
    logic [255:0] k;
    logic [127:0] pt;
    key = '0; din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // Known answers: keys 00 01 02 ... of each length, block 00112233...
    load_key(256'h00010203_04050607_08090a0b_0c0d0e0f_10111213_14151617_18191a1b_1c1d1e1f);
    run(128'h00112233_44556677_8899aabb_ccddeeff, 0, r);
    expect_eq("AES-128 encrypt", r[0], 128'h69c4e0d8_6a7b0430_d8cdb780_70b4c55a);
    expect_eq("AES-192 encrypt", r[1], 128'hdda97ca4_864cdfe0_6eaf70a0_ec0d7191);
    expect_eq("AES-256 encrypt", r[2], 128'h8ea2b7ca_516745bf_eafc4990_4b496089);
    run(128'h69c4e0d8_6a7b0430_d8cdb780_70b4c55a, 1, r);
    expect_eq("AES-128 decrypt", r[0], 128'h00112233_44556677_8899aabb_ccddeeff);
    run(128'hdda97ca4_864cdfe0_6eaf70a0_ec0d7191, 1, r);
    expect_eq("AES-192 decrypt", r[1], 128'h00112233_44556677_8899aabb_ccddeeff);
    run(128'h8ea2b7ca_516745bf_eafc4990_4b496089, 1, r);
    expect_eq("AES-256 decrypt", r[2], 128'h00112233_44556677_8899aabb_ccddeeff);

    load_key({128'h2b7e1516_28aed2a6_abf71588_09cf4f3c, 128'h0});
    run(128'h3243f6a8_885a308d_313198a2_e0370734, 0, r);
    expect_eq("AES-128 example", r[0], 128'h3925841d_02dc09fb_dc118597_196a0b32);

    for (int n = 0; n < 4; n++) begin
      k = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      load_key(k);
      for (int m = 0; m < 4; m++) begin
        pt = {$urandom, $urandom, $urandom, $urandom};
        run(pt, 0, r);
        expect_eq("enc 128", r[0], encrypt(k, 4, pt));
        expect_eq("enc 192", r[1], encrypt(k, 6, pt));
        expect_eq("enc 256", r[2], encrypt(k, 8, pt));
        run(pt, 1, r);
        expect_eq("dec 128", r[0], tb_ref_pkg::decrypt(k, 4, pt));
        expect_eq("dec 192", r[1], tb_ref_pkg::decrypt(k, 6, pt));
        expect_eq("dec 256", r[2], tb_ref_pkg::decrypt(k, 8, pt));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
