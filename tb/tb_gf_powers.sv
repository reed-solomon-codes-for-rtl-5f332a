// tb_gf_powers: checks alpha_k^0..alpha_k^T for every field element at the
// default T = 8 and at T = 10 (where powers above 8 use the product chain),
// against repeated reference multiplication.
module tb_gf_powers;
  import tb_gf_pkg::*;
  sym_t a;
  sym_t pw8 [9];
  sym_t pw10 [11];
  int checks = 0, failures = 0;

  gf_powers              dut8  (.a, .pw(pw8));
  gf_powers #(.T(10))    dut10 (.a, .pw(pw10));

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
      for (int e = 0; e <= 8; e++) begin
        checks++;
        if (pw8[e] != ref_pow(a, e)) begin
          failures++;
          if (failures < 10) $display("FAIL %02h^%0d = %02h", a, e, pw8[e]);
        end
      end
      for (int e = 0; e <= 10; e++) begin
        checks++;
        if (pw10[e] != ref_pow(a, e)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
