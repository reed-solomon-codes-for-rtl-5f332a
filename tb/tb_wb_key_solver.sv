// tb_wb_key_solver: the modified Welch-Berlekamp solver on remainders of
// random error patterns (0 to 8 symbol errors, r(x) = e(x) mod g(x) by
// reference long division). For every pattern it checks, with reference
// arithmetic only:
//   - done comes exactly 8T = 64 clocks after start, busy in between;
//   - the key equation Q(alpha^k) R_k = N(alpha^k) for all 16 checks, with
//     R_k = r_k * C * prod_{j != k} (alpha^k + alpha^j);
//   - Q(x) has exactly the error positions as roots among the 255 locations;
//   - deg N < deg Q;
//   - at data positions the error value equals N / (C g(x) Q'(x)).
// Branches A, B and C must each be seen.
module tb_wb_key_solver;
  import tb_gf_pkg::*;
  import rs_pkg::wb_branch_e;
  localparam int N = 255, T = 8, P = 16, NPAT = 40;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, srst, start, busy, done, step_valid;
  wb_branch_e step_branch;
  sym_t r_in [P];
  sym_t q_out [T+1];
  sym_t n_out [T];
  int checks = 0, failures = 0;
  int n_a = 0, n_b = 0, n_c = 0;

  wb_key_solver dut (.*);

  always @(posedge clk)
    if (step_valid) begin
      if (step_branch == rs_pkg::WB_BR_A) n_a++;
      else if (step_branch == rs_pkg::WB_BR_B) n_b++;
      else n_c++;
    end

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

  initial begin
    sym_t C;
    poly_t g;
    C = ref_c(P);
    g = ref_genpoly(P);
    rst_n = 1'b1; srst = 1'b0; start = 1'b0;
    foreach (r_in[i]) r_in[i] = '0;
    #1 rst_n = 1'b0;
    #10 rst_n = 1'b1;
    for (int pat = 0; pat < NPAT; pat++) begin
      poly_t e, r, q, nn, qd, f;
      bit is_err [N];
      int ne, lat, roots, degq, degn;
      ne = (pat < 9) ? pat : $urandom_range(0, T);
      foreach (e[d]) e[d] = 8'h00;
      for (int d = 0; d < N; d++) is_err[d] = 1'b0;
      for (int i = 0; i < ne; i++) begin
        int d;
        do d = (pat % 3 == 0) ? $urandom_range(0, N - 1) : $urandom_range(P, N - 1);
        while (is_err[d]);
        is_err[d] = 1'b1;
        e[d] = sym_t'($urandom_range(1, 255));
      end
      r = ref_mod(e, P);
      @(negedge clk);
      for (int i = 0; i < P; i++) r_in[i] = r[i];
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      foreach (r_in[i]) r_in[i] = sym_t'($urandom);   // must have been sampled
      lat = 0;
      while (!done) begin
        check(busy, "busy while solving");
        @(negedge clk);
        lat++;
      end
      check(lat == 8 * T, $sformatf("solve took %0d clocks, expected %0d", lat, 8 * T));
      foreach (q[d]) begin q[d] = 8'h00; nn[d] = 8'h00; end
      for (int l = 0; l <= T; l++) q[l] = q_out[l];
      for (int l = 0; l < T; l++)  nn[l] = n_out[l];
      // key equation
      for (int k = 0; k < P; k++) begin
        automatic sym_t Rk = ref_mul(r[k], C);
        for (int j = 0; j < P; j++) if (j != k) Rk = ref_mul(Rk, ref_alpha(k) ^ ref_alpha(j));
        check(ref_mul(ref_eval(q, ref_alpha(k)), Rk) == ref_eval(nn, ref_alpha(k)),
              $sformatf("pattern %0d key equation at check %0d", pat, k));
      end
      // roots
      roots = 0;
      for (int d = 0; d < N; d++) begin
        automatic bit z = (ref_eval(q, ref_alpha(d)) == 8'h00);
        if (z) roots++;
        check(z == is_err[d], $sformatf("pattern %0d (%0d errors): root at %0d is %0d", pat, ne, d, z));
      end
      degq = -1; degn = -1;
      for (int d = 0; d < 256; d++) begin
        if (q[d] != 0) degq = d;
        if (nn[d] != 0) degn = d;
      end
      check(degq == ne, $sformatf("pattern %0d deg Q = %0d, %0d errors", pat, degq, ne));
      check(degn < degq, "deg N < deg Q");
      // error values at data positions
      qd = ref_deriv(q);
      foreach (f[d]) f[d] = ref_mul(C, g[d]);
      for (int d = P; d < N; d++)
        if (is_err[d]) begin
          automatic sym_t x = ref_alpha(d);
          automatic sym_t ev = ref_mul(ref_eval(nn, x), ref_inv(ref_mul(ref_eval(f, x), ref_eval(qd, x))));
          check(ev == e[d], $sformatf("pattern %0d error value at %0d", pat, d));
        end
    end
    $display("branches A=%0d B=%0d C=%0d", n_a, n_b, n_c);
    check(n_a > 0 && n_b > 0 && n_c > 0, "all three branches taken");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
