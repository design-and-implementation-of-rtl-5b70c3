// tb_key_expansion: the key schedule for 128-, 192- and 256-bit keys.
// Every round key is compared with the reference model, for the key of the
// AES specification's example and for random keys; the last AES-128 round
// key of that example is also checked literally; and the number of clocks
// from load to ready must be 4*(NR+1) - NK (40, 46, 52).
module tb_key_expansion;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, load = 0;
  logic [255:0] key;
  logic [3:0] rk_idx;
  logic ready4, ready6, ready8;
  logic [127:0] rk4, rk6, rk8;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  key_expansion                dut4 (.clk, .rst_n, .load, .key(key[255:128]), .ready(ready4), .rk_idx, .rk(rk4));
  key_expansion #(.NK(6))      dut6 (.clk, .rst_n, .load, .key(key[255:64]),  .ready(ready6), .rk_idx, .rk(rk6));
  key_expansion #(.NK(8))      dut8 (.clk, .rst_n, .load, .key(key),          .ready(ready8), .rk_idx, .rk(rk8));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic [255:0] k);
    logic [127:0] r4 [15];
    logic [127:0] r6 [15];
    logic [127:0] r8 [15];
    int n4 = -1, n6 = -1, n8 = -1;
    expand(k, 4, r4);
    expand(k, 6, r6);
    expand(k, 8, r8);
    @(negedge clk);
    key = k; load = 1;
    @(negedge clk);
    load = 0;
    for (int c = 1; c <= 60; c++) begin
      if (ready4 && n4 < 0) n4 = c - 1;
      if (ready6 && n6 < 0) n6 = c - 1;
      if (ready8 && n8 < 0) n8 = c - 1;
      @(negedge clk);
    end
    checks += 3;
    if (n4 != 40) begin failures++; $display("FAIL AES-128 ready after %0d", n4); end
    if (n6 != 46) begin failures++; $display("FAIL AES-192 ready after %0d", n6); end
    if (n8 != 52) begin failures++; $display("FAIL AES-256 ready after %0d", n8); end
    for (int r = 0; r <= 14; r++) begin
      rk_idx = 4'(r); #1;
      if (r <= 10) begin checks++; if (rk4 !== r4[r]) begin failures++; $display("FAIL nk4 rk%0d %h exp %h", r, rk4, r4[r]); end end
      if (r <= 12) begin checks++; if (rk6 !== r6[r]) begin failures++; $display("FAIL nk6 rk%0d %h exp %h", r, rk6, r6[r]); end end
      checks++; if (rk8 !== r8[r]) begin failures++; $display("FAIL nk8 rk%0d %h exp %h", r, rk8, r8[r]); end
    end
  endtask

  initial begin
    key = '0; rk_idx = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    checks++;
    if (ready4 || ready6 || ready8) failures++;
    run({128'h2b7e1516_28aed2a6_abf71588_09cf4f3c, 128'h0});
    rk_idx = 4'd1; #1;
    checks++;
    if (rk4 !== 128'ha0fafe17_88542cb1_23a33939_2a6c7605) failures++;
    rk_idx = 4'd10; #1;
    checks++;
    if (rk4 !== 128'hd014f9a8_c9ee2589_e13f0cc8_b6630ca6) failures++;
    for (int n = 0; n < 5; n++)
      run({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
