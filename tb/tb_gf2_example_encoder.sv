// tb_gf2_example_encoder: shifts every 3-bit message b2,b1,b0 (b2 first)
// into the GF(2) example encoder and compares the register after each shift
// with the printed shift table:
//   shift 1: R0=b2,    R1=b2,       R2=0
//   shift 2: R0=b1,    R1=b1+b2,    R2=b2
//   shift 3: R0=b0+b2, R1=b0+b1+b2, R2=b1+b2
module tb_gf2_example_encoder;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, clear, shift, din;
  logic [2:0] r;
  int checks = 0, failures = 0;

  gf2_example_encoder dut (.clk, .rst_n, .clear, .shift, .din, .r);

  task automatic expect_r(logic r0, logic r1, logic r2, int b, int s);
    checks++;
    if (r != {r2, r1, r0}) begin
      failures++;
      $display("FAIL b=%0d shift %0d: R2R1R0=%03b expected %b%b%b", b, s, r, r2, r1, r0);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b1; clear = 1'b0; shift = 1'b0; din = 1'b0;
    #1 rst_n = 1'b0;
    #10 rst_n = 1'b1;
    for (int b = 0; b < 8; b++) begin
      logic b0, b1, b2;
      {b2, b1, b0} = 3'(b);
      @(negedge clk); clear = 1'b1;
      @(negedge clk); clear = 1'b0;
      expect_r(0, 0, 0, b, 0);
      shift = 1'b1;
      din = b2; @(negedge clk); expect_r(b2, b2, 0, b, 1);
      din = b1; @(negedge clk); expect_r(b1, b1 ^ b2, b2, b, 2);
      din = b0; @(negedge clk); expect_r(b0 ^ b2, b0 ^ b1 ^ b2, b1 ^ b2, b, 3);
      shift = 1'b0;
      @(negedge clk); expect_r(b0 ^ b2, b0 ^ b1 ^ b2, b1 ^ b2, b, 4);   // holds
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
