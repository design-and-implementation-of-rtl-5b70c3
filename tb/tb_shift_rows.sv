// tb_shift_rows: ShiftRows / InvShiftRows.  The AES specification example,
// a state of distinct byte values whose result is worked out by hand, random
// states against the reference, and the round trip.
module tb_shift_rows;
  import tb_ref_pkg::*;
  import aes_pkg::state_t;

  state_t din, dout;
  logic   inv;
  int checks = 0, failures = 0;

  shift_rows dut (.din, .inv, .dout);

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
    logic [127:0] x;
    // Bytes 00..0f: row r rotates left by r.
    check(128'h00010203_04050607_08090a0b_0c0d0e0f, 0, 128'h00050a0f_04090e03_080d0207_0c01060b);
    check(128'h00050a0f_04090e03_080d0207_0c01060b, 1, 128'h00010203_04050607_08090a0b_0c0d0e0f);
    check(128'hd42711ae_e0bf98f1_b8b45de5_1e415230, 0, 128'hd4bf5d30_e0b452ae_b84111f1_1e2798e5);
    for (int n = 0; n < 1000; n++) begin
      x = {$urandom, $urandom, $urandom, $urandom};
      check(x, n[0], from_st(shrows(to_st(x), n[0])));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
