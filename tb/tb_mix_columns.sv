// tb_mix_columns: MixColumns / InvMixColumns.  Known column results from the
// AES specification, random states against the reference model in both
// directions, and the round trip InvMixColumns(MixColumns(s)) = s.
module tb_mix_columns;
  import tb_ref_pkg::*;
  import aes_pkg::state_t;

  state_t din, dout;
  logic   inv;
  int checks = 0, failures = 0;

  mix_columns dut (.din, .inv, .dout);

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
    // Columns db135345 -> 8e4da1bc, f20a225c -> 9fdc589d, 01010101, c6c6c6c6.
    check(128'hdb135345_f20a225c_01010101_c6c6c6c6, 0,
          128'h8e4da1bc_9fdc589d_01010101_c6c6c6c6);
    check(128'h8e4da1bc_9fdc589d_01010101_c6c6c6c6, 1,
          128'hdb135345_f20a225c_01010101_c6c6c6c6);
    // First round of the cipher example in the AES specification.
    check(128'hd4bf5d30_e0b452ae_b84111f1_1e2798e5, 0,
          128'h046681e5_e0cb199a_48f8d37a_2806264c);
    for (int n = 0; n < 2000; n++) begin
      x = {$urandom, $urandom, $urandom, $urandom};
      check(x, n[0], from_st(mixcol(to_st(x), n[0])));
    end
    for (int n = 0; n < 200; n++) begin
      x = {$urandom, $urandom, $urandom, $urandom};
      din = x; inv = 0; #1;
      din = dout; inv = 1; #1;
      checks++;
      if (dout !== x) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
