// tb_sub_bytes: SubBytes / InvSubBytes on whole states: the first-round
// example of the AES specification, then random states in both directions
// against the reference S-box applied byte by byte.
module tb_sub_bytes;
  import tb_ref_pkg::*;
  import aes_pkg::state_t;

  state_t din, dout;
  logic   inv;
  b8 sb [256];
  b8 si [256];
  int checks = 0, failures = 0;

  sub_bytes dut (.din, .inv, .dout);

  task automatic check(logic [127:0] x, bit i, logic [127:0] exp);
    din = x; inv = i; #1;
    checks++;
    if (dout !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL in=%h inv=%0d out=%h exp=%h", x, i, dout, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] x, e;
    sbox_tables(sb, si);
    check(128'h193de3be_a0f4e22b_9ac68d2a_e9f84808, 0, 128'hd42711ae_e0bf98f1_b8b45de5_1e415230);
    check(128'hd42711ae_e0bf98f1_b8b45de5_1e415230, 1, 128'h193de3be_a0f4e22b_9ac68d2a_e9f84808);
    for (int n = 0; n < 2000; n++) begin
      x = {$urandom, $urandom, $urandom, $urandom};
      for (int i = 0; i < 16; i++) e[127 - 8*i -: 8] = n[0] ? si[x[127 - 8*i -: 8]] : sb[x[127 - 8*i -: 8]];
      check(x, n[0], e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
