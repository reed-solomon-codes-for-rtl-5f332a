// tb_rs_reencoder: random received words through the re-encoder, with idle
// cycles, an aborted word restarted by sym_first and a synchronous clear.
// r_vec must equal v(x) mod g(x) from reference long division, and done must
// pulse exactly one cycle after the last symbol.
module tb_rs_reencoder;
  import tb_gf_pkg::*;
  localparam int N = 255, P = 16, NCW = 5;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, srst, sym_valid, sym_first, done;
  sym_t sym_data;
  sym_t r_vec [P];
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  rs_reencoder dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic put(sym_t d, bit first);
    @(negedge clk);
    while ($urandom_range(0, 3) == 0) begin
      sym_valid = 1'b0;
      @(negedge clk);
    end
    sym_valid = 1'b1; sym_data = d; sym_first = first;
    @(negedge clk);
    sym_valid = 1'b0; sym_first = 1'b0;
  endtask

  initial begin
    rst_n = 1'b1; srst = 1'b0; sym_valid = 1'b0; sym_first = 1'b0; sym_data = '0;
    #1 rst_n = 1'b0;
    #10 rst_n = 1'b1;
    // partial word, then synchronous clear
    for (int i = 0; i < 30; i++) put(sym_t'($urandom), i == 0);
    @(negedge clk); srst = 1'b1;
    @(negedge clk); srst = 1'b0;
    for (int c = 0; c < NCW; c++) begin
      poly_t v, r;
      int t_last;
      if (c == 2) for (int i = 0; i < 77; i++) put(sym_t'($urandom), i == 0);   // aborted word
      foreach (v[d]) v[d] = 8'h00;
      for (int j = 0; j < N; j++) v[N - 1 - j] = sym_t'($urandom);
      r = ref_mod(v, P);
      // sym_first on the first symbol of words 0 and 2 only: the others
      // follow on from the previous word
      for (int j = 0; j < N; j++) begin
        put(v[N - 1 - j], (j == 0) && (c == 0 || c == 2));
        if (j == N - 1) t_last = cyc;
        if (j < N - 1) check(!done, "done too early");
      end
      // put() returned at the negedge after the last symbol's edge
      check(done && cyc == t_last, "done in the cycle after the last symbol");
      for (int i = 0; i < P; i++)
        check(r_vec[i] == r[i], $sformatf("word %0d r_%0d = %02h expected %02h", c, i, r_vec[i], r[i]));
      @(negedge clk);
      check(!done, "done is a single-cycle pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
