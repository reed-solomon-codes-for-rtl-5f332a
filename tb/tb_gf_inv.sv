// tb_gf_inv: exhaustive test of the GF(2^8) inverse: a * inv(a) = 1 for
// every non-zero a (reference product), and inv(0) = 0.
module tb_gf_inv;
  import tb_gf_pkg::*;
  sym_t a, y;
  int checks = 0, failures = 0;

  gf_inv dut (.a, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      a = sym_t'(i);
      #1;
      checks++;
      if ((i == 0) ? (y != 8'h00) : (ref_mul(a, y) != 8'h01)) begin
        failures++;
        if (failures < 10) $display("FAIL inv(%02h) = %02h", a, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
