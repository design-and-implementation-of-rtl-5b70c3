// tb_aes_round: one combinational round in each direction and both the
// middle-round and last-round forms.  The first round of the AES
// specification's example is checked literally; random states and keys are
// checked against the reference model built from its step functions.
module tb_aes_round;
  import tb_ref_pkg::*;
  import aes_pkg::state_t;

  state_t din, rk, dout;
  logic   inv, last;
  b8 sb [256];
  b8 si [256];
  int checks = 0, failures = 0;

  aes_round dut (.din, .rk, .inv, .last, .dout);

  function automatic logic [127:0] ref_round(logic [127:0] x, logic [127:0] k, bit i, bit l);
    st_t s = to_st(x);
    if (!i) begin
      for (int b = 0; b < 16; b++) s[b] = sb[s[b]];
      s = shrows(s, 0);
      if (!l) s = mixcol(s, 0);
      return from_st(s) ^ k;
    end else begin
      s = shrows(s, 1);
      for (int b = 0; b < 16; b++) s[b] = si[s[b]];
      s = to_st(from_st(s) ^ k);
      if (!l) s = mixcol(s, 1);
      return from_st(s);
    end
  endfunction

  task automatic check(logic [127:0] x, logic [127:0] k, bit i, bit l, logic [127:0] exp);
    din = x; rk = k; inv = i; last = l; #1;
    checks++;
    if (dout !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL in=%h inv=%0d last=%0d out=%h exp=%h", x, i, l, dout, exp);
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
    logic [127:0] x, k;
    sbox_tables(sb, si);
    check(128'h193de3be_a0f4e22b_9ac68d2a_e9f84808, 128'ha0fafe17_88542cb1_23a33939_2a6c7605, 0, 0,
          128'ha49c7ff2_689f352b_6b5bea43_026a5049);
    // Decryption round undoes it.
    check(128'ha49c7ff2_689f352b_6b5bea43_026a5049, 128'ha0fafe17_88542cb1_23a33939_2a6c7605, 1, 0,
          ref_round(128'ha49c7ff2_689f352b_6b5bea43_026a5049, 128'ha0fafe17_88542cb1_23a33939_2a6c7605, 1, 0));
    for (int n = 0; n < 2000; n++) begin
      x = {$urandom, $urandom, $urandom, $urandom};
      k = {$urandom, $urandom, $urandom, $urandom};
      check(x, k, n[0], n[1], ref_round(x, k, n[0], n[1]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
