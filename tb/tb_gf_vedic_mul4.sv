// tb_gf_vedic_mul4: exhaustive check of the 4x4 Vedic carry-free multiplier
// against a shift-and-XOR polynomial product, all 256 operand pairs.
module tb_gf_vedic_mul4;
  import tb_ref_pkg::*;

  logic [3:0] a, b;
  logic [6:0] p;
  int checks = 0, failures = 0;

  gf_vedic_mul4 dut (.a, .b, .p);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a = 4'(i); b = 4'(j);
        #1;
        checks++;
        if (p !== clmul4(a, b)) begin
          failures++;
          if (failures < 10) $display("FAIL %h * %h = %h, expected %h", a, b, p, clmul4(a, b));
        end
      end
    // The all-ones case exercises every step of the sutra: 1111 x 1111 = 1010101.
    a = 4'hf; b = 4'hf; #1;
    checks++;
    if (p !== 7'b1010101) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
