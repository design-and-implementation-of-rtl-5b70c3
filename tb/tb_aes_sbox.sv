// tb_aes_sbox: both tables of the substitution box for all 256 inputs,
// against a brute-force inverse plus affine-map reference; rows 0 and f of
// the inverse table as printed in the usual tabulation; and a few forward
// values from the AES specification.
module tb_aes_sbox;
  import tb_ref_pkg::*;

  logic [7:0] x, y;
  logic       inv;
  b8 sb [256];
  b8 si [256];
  int checks = 0, failures = 0;

  localparam b8 INV_ROW0 [16] = '{8'h52, 8'h09, 8'h6a, 8'hd5, 8'h30, 8'h36, 8'ha5, 8'h38,
                                  8'hbf, 8'h40, 8'ha3, 8'h9e, 8'h81, 8'hf3, 8'hd7, 8'hfb};
  localparam b8 INV_ROWF [16] = '{8'h17, 8'h2b, 8'h04, 8'h7e, 8'hba, 8'h77, 8'hd6, 8'h26,
                                  8'he1, 8'h69, 8'h14, 8'h63, 8'h55, 8'h21, 8'h0c, 8'h7d};

  aes_sbox dut (.x, .inv, .y);

  task automatic check(b8 in, bit i, b8 exp);
    x = in; inv = i; #1;
    checks++;
    if (y !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL x=%h inv=%0d y=%h exp=%h", in, i, y, exp);
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
    sbox_tables(sb, si);
    for (int i = 0; i < 16; i++) begin
      check(8'(i), 1, INV_ROW0[i]);
      check(8'(8'hf0 + i), 1, INV_ROWF[i]);
    end
    check(8'h00, 0, 8'h63);
    check(8'h01, 0, 8'h7c);
    check(8'h53, 0, 8'hed);
    check(8'hff, 0, 8'h16);
    for (int i = 0; i < 256; i++) begin
      check(8'(i), 0, sb[i]);
      check(8'(i), 1, si[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
