// tb_add_round_key: the AES specification's first key addition and random
// state/key pairs, checked bit by bit against XOR.
module tb_add_round_key;
  import aes_pkg::state_t;

  state_t din, rk, dout;
  int checks = 0, failures = 0;

  add_round_key dut (.din, .rk, .dout);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] x, k, e;
    din = 128'h3243f6a8_885a308d_313198a2_e0370734;
    rk  = 128'h2b7e1516_28aed2a6_abf71588_09cf4f3c;
    #1;
    checks++;
    if (dout !== 128'h193de3be_a0f4e22b_9ac68d2a_e9f84808) failures++;
    for (int n = 0; n < 1000; n++) begin
      x = {$urandom, $urandom, $urandom, $urandom};
      k = {$urandom, $urandom, $urandom, $urandom};
      for (int b = 0; b < 128; b++) e[b] = (x[b] != k[b]);
      din = x; rk = k; #1;
      checks++;
      if (dout !== e) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
