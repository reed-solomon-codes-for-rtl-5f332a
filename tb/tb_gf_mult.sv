// tb_gf_mult: exhaustive test of the GF(2^8) multiplier against the
// reference product of tb_gf_pkg (all 65536 operand pairs).
module tb_gf_mult;
  import tb_gf_pkg::*;
  sym_t a, b, p;
  int checks = 0, failures = 0;

  gf_mult dut (.a, .b, .p);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a = sym_t'(i); b = sym_t'(j);
        #1;
        checks++;
        if (p !== ref_mul(a, b)) begin
          failures++;
          if (failures < 10) $display("FAIL %02h*%02h = %02h, expected %02h", a, b, p, ref_mul(a, b));
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
