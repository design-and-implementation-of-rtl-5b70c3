// tb_gf_vedic_mul8: exhaustive check of the GF(2^8) Vedic multiplier, all
// 65536 operand pairs, against the exponential/logarithm-table product, and
// a few products known from the AES specification.
module tb_gf_vedic_mul8;
  import tb_ref_pkg::*;

  logic [7:0] a, b, p;
  b8 e [256];
  b8 l [256];
  int checks = 0, failures = 0;

  gf_vedic_mul8 dut (.a, .b, .p);

  function automatic b8 by_tables(b8 x, b8 y);
    int s;
    if (x == 0 || y == 0) return 0;
    s = int'(l[x]) + int'(l[y]);
    if (s > 255) s -= 255;
    return e[s];
  endfunction

  task automatic check(b8 x, b8 y, b8 exp);
    a = x; b = y; #1;
    checks++;
    if (p !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h = %h, expected %h", x, y, p, exp);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    log_tables(e, l);
    // Spot values of the printed exponential and logarithm tables.
    checks += 4;
    if (e[8'h07] != 8'hff) failures++;
    if (e[8'hff] != 8'h01) failures++;
    if (l[8'h03] != 8'h01) failures++;
    if (l[8'hff] != 8'h07) failures++;
    // AES specification examples: 57*83 = c1, 57*13 = fe.
    check(8'h57, 8'h83, 8'hc1);
    check(8'h57, 8'h13, 8'hfe);
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++)
        check(8'(i), 8'(j), by_tables(8'(i), 8'(j)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
