// tb_chien_error_eval: loads random locators Q(x) = c * prod (x + alpha^d)
// over 0..8 random positions and random evaluators N(x) (degree < 8), then
// steps through all 255 positions with random pauses. At every step it
// checks pos (N-1 down to 0), is_parity (pos < 16), err_found (a root of Q)
// and, at roots in the data part, err_val = N / (C g(x) Q'(x)) computed
// with reference arithmetic.
module tb_chien_error_eval;
  import tb_gf_pkg::*;
  localparam int N = 255, T = 8, P = 16, NPAT = 12;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, load, advance, is_parity, err_found;
  logic [7:0] pos;
  sym_t err_val;
  sym_t q_in [T+1];
  sym_t n_in [T];
  int checks = 0, failures = 0;

  chien_error_eval dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sym_t C;
    poly_t g, f;
    C = ref_c(P);
    g = ref_genpoly(P);
    foreach (f[d]) f[d] = ref_mul(C, g[d]);
    rst_n = 1'b1; load = 1'b0; advance = 1'b0;
    foreach (q_in[i]) q_in[i] = '0;
    foreach (n_in[i]) n_in[i] = '0;
    #1 rst_n = 1'b0;
    #10 rst_n = 1'b1;
    for (int pat = 0; pat < NPAT; pat++) begin
      poly_t q, nn, qd;
      bit is_root [N];
      int nr;
      nr = (pat <= T) ? pat : $urandom_range(0, T);
      foreach (q[d]) begin q[d] = 8'h00; nn[d] = 8'h00; end
      q[0] = sym_t'($urandom_range(1, 255));
      for (int d = 0; d < N; d++) is_root[d] = 1'b0;
      for (int i = 0; i < nr; i++) begin
        int d;
        poly_t h;
        do d = $urandom_range(0, N - 1); while (is_root[d]);
        is_root[d] = 1'b1;
        foreach (h[m]) h[m] = ref_mul(q[m], ref_alpha(d)) ^ ((m > 0) ? q[m-1] : 8'h00);
        q = h;
      end
      for (int l = 0; l < T; l++) nn[l] = (l < nr) ? sym_t'($urandom) : 8'h00;
      qd = ref_deriv(q);
      @(negedge clk);
      for (int l = 0; l <= T; l++) q_in[l] = q[l];
      for (int l = 0; l < T; l++)  n_in[l] = nn[l];
      load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      for (int d = N - 1; d >= 0; d--) begin
        check(pos == 8'(d), $sformatf("pos %0d expected %0d", pos, d));
        check(is_parity == (d < P), "is_parity");
        check(err_found == is_root[d], $sformatf("pattern %0d err_found at %0d", pat, d));
        if (is_root[d] && d >= P) begin
          automatic sym_t x = ref_alpha(d);
          automatic sym_t ev = ref_mul(ref_eval(nn, x), ref_inv(ref_mul(ref_eval(f, x), ref_eval(qd, x))));
          check(err_val == ev, $sformatf("pattern %0d err_val at %0d: %02h expected %02h", pat, d, err_val, ev));
        end
        while ($urandom_range(0, 3) == 0) @(negedge clk);   // pause: state must hold
        advance = 1'b1;
        @(negedge clk);
        advance = 1'b0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
