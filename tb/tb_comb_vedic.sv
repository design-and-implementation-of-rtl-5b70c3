// tb_comb_vedic: the 4x4 matrix unit.  Inputs 1..16 with the encryption
// matrix must give 15 0 5 14 19 12 9 26 7 8 13 6 43 20 17 50 (decimal):
// p9 = 9*2 ^ 10 ^ 11 ^ 12*3 = 18 ^ 10 ^ 11 ^ 20 = 7;
// then random matrices in both modes against a row-times-matrix reference,
// and a check that the decryption matrix undoes the encryption matrix.
module tb_comb_vedic;
  import tb_ref_pkg::*;

  logic [0:15][7:0] a, p;
  logic             inv;
  int checks = 0, failures = 0;

  localparam b8 ENC [4][4] = '{'{2, 3, 1, 1}, '{1, 2, 3, 1}, '{1, 1, 2, 3}, '{3, 1, 1, 2}};
  localparam b8 DEC [4][4] = '{'{14, 11, 13, 9}, '{9, 14, 11, 13}, '{13, 9, 14, 11}, '{11, 13, 9, 14}};
  localparam int FIG [16] = '{15, 0, 5, 14, 19, 12, 9, 26, 7, 8, 13, 6, 43, 20, 17, 50};

  comb_vedic dut (.a, .inv, .p);

  function automatic logic [0:15][7:0] ref_mul(logic [0:15][7:0] x, bit dec);
    logic [0:15][7:0] y;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) begin
        y[4*r + c] = 0;
        for (int k = 0; k < 4; k++)
          y[4*r + c] ^= gmul(x[4*r + k], dec ? DEC[k][c] : ENC[k][c]);
      end
    return y;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [0:15][7:0] x, y;
    for (int i = 0; i < 16; i++) a[i] = 8'(i + 1);
    inv = 0; #1;
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (p[i] !== 8'(FIG[i])) begin
        failures++;
        $display("FAIL p%0d = %0d, expected %0d", i + 1, p[i], FIG[i]);
      end
    end
    for (int n = 0; n < 2000; n++) begin
      for (int i = 0; i < 16; i++) a[i] = 8'($urandom);
      inv = n[0]; #1;
      checks++;
      if (p !== ref_mul(a, inv)) begin
        failures++;
        if (failures < 10) $display("FAIL random %h inv=%0d", a, inv);
      end
    end
    // A * B is the identity matrix, so X*A*B = X.
    for (int n = 0; n < 200; n++) begin
      for (int i = 0; i < 16; i++) x[i] = 8'($urandom);
      a = x; inv = 0; #1;
      y = p;
      a = y; inv = 1; #1;
      checks++;
      if (p !== x) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
