// tb_rs_wb_decoder: the decoder alone, fed with codewords built by reference
// long division (independent of the design's encoder). Words carry 0..8
// random symbol errors, some in the parity part.
// Words 0..3 stream back to back with do_acpt held high: the decoder must not
// stall and the first output must appear N + 8T + 3 = 322 clocks after the
// first input. Later words see random idle input cycles and random output
// back-pressure. Each output symbol (parity included: it is rebuilt from the
// corrected data), do_error, do_parity_n and do_sync_out are compared with
// the transmitted word.
// The last word is the all-zero codeword with T single-bit errors
// 01, 02, 04 ... 80 in its first T symbols: the decoder must flag and clear
// exactly those T symbols.
module tb_rs_wb_decoder;
  import tb_gf_pkg::*;
  localparam int N = 255, T = 8, P = 16, K = 239, NCW = 11;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic reset_n, reset_sync_n, di_rdy, di_sync_in, di_acpt;
  logic do_rdy, do_acpt, do_sync_out, do_error, do_parity_n;
  sym_t di, dout;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  rs_wb_decoder dut (.*);

  sym_t cw [NCW][N];
  sym_t rx [NCW][N];
  bit   ep [NCW][N];
  int   t_in = -1, t_out = -1, stall_cont = 0, fixes = 0, par_fix = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic feed();
    for (int c = 0; c < NCW; c++) begin
      int j = 0;
      while (j < N) begin
        @(negedge clk);
        di_rdy = (c < 4) || ($urandom_range(0, 4) != 0);
        di = rx[c][j];
        di_sync_in = (j == 0);
        #1;
        if (c < 4 && !di_acpt) stall_cont++;
        if (di_rdy && di_acpt) begin
          if (c == 0 && j == 0) t_in = cyc;
          j++;
        end
      end
    end
    @(negedge clk);
    di_rdy = 1'b0;
  endtask

  task automatic drain();
    int c = 0, j = 0;
    while (c < NCW) begin
      @(negedge clk);
      do_acpt = (c < 4) || ($urandom_range(0, 2) != 0);
      #1;
      if (do_rdy && do_acpt) begin
        if (t_out < 0) t_out = cyc;
        check(dout == cw[c][j],
              $sformatf("word %0d symbol %0d: %02h expected %02h", c, j, dout, cw[c][j]));
        check(do_error == ep[c][j], "do_error");
        if (j >= K && ep[c][j]) par_fix++;
        check(do_parity_n == (j < K), "do_parity_n");
        check(do_sync_out == (j == 0), "do_sync_out");
        if (do_error) fixes++;
        j++;
        if (j == N) begin j = 0; c++; end
      end
    end
  endtask

  initial begin
    for (int c = 0; c < NCW; c++) begin
      poly_t v, r;
      int ne;
      foreach (v[d]) v[d] = 8'h00;
      for (int j = 0; j < K; j++) v[N - 1 - j] = sym_t'($urandom);
      r = ref_mod(v, P);
      for (int j = 0; j < N; j++) begin
        cw[c][j] = (j < K) ? v[N - 1 - j] : r[N - 1 - j];
        ep[c][j] = 1'b0;
      end
      ne = (c == 0) ? 0 : (c == 1) ? T : $urandom_range(0, T);
      for (int e = 0; e < ne; e++) begin
        int j;
        do j = (c == 2 && e < 3) ? $urandom_range(K, N - 1) : $urandom_range(0, N - 1);
        while (ep[c][j]);
        ep[c][j] = 1'b1;
      end
      for (int j = 0; j < N; j++)
        rx[c][j] = ep[c][j] ? cw[c][j] ^ sym_t'($urandom_range(1, 255)) : cw[c][j];
      if (c == NCW - 1)
        for (int j = 0; j < N; j++) begin
          cw[c][j] = 8'h00;
          ep[c][j] = (j < T);
          rx[c][j] = (j < T) ? sym_t'(1 << j) : 8'h00;
        end
    end
    reset_n = 1'b1; reset_sync_n = 1'b1;
    di = '0; di_rdy = 1'b0; di_sync_in = 1'b0; do_acpt = 1'b1;
    #1 reset_n = 1'b0;
    #20 reset_n = 1'b1;
    fork
      feed();
      drain();
    join
    check(t_out - t_in == N + 8 * T + 3, $sformatf("latency %0d", t_out - t_in));
    check(stall_cont == 0, "continuous stream stalled");
    check(fixes > 0, "no correction made");
    check(par_fix > 0, "no parity symbol rebuilt");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
