// tb_rs_encoder: random information blocks through the RS(255,239) encoder
// with random stalls on both handshakes. Each output codeword must carry the
// information unchanged followed by the remainder of I(x)x^16 mod g(x),
// computed by reference long division, with correct sync/parity flags and
// no input accepted during the parity symbols. A partial word abandoned
// with clr must leave no trace.
module tb_rs_encoder;
  import tb_gf_pkg::*;
  localparam int N = 255, K = 239, P = 16, NCW = 4;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, clr, in_valid, in_ready, out_valid, out_ready, out_sync, out_parity;
  sym_t in_data, out_data;
  int checks = 0, failures = 0;

  rs_encoder dut (.*);

  sym_t info [NCW][K];
  sym_t expc [NCW][N];

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
    int c_in = 0, j_in = 0, c_out = 0, j_out = 0;
    for (int c = 0; c < NCW; c++) begin
      poly_t v, r;
      foreach (v[d]) v[d] = 8'h00;
      for (int j = 0; j < K; j++) begin
        info[c][j] = sym_t'($urandom);
        v[N - 1 - j] = info[c][j];
      end
      r = ref_mod(v, P);
      for (int j = 0; j < N; j++) expc[c][j] = (j < K) ? info[c][j] : r[N - 1 - j];
    end
    rst_n = 1'b1; clr = 1'b0; in_valid = 1'b0; out_ready = 1'b0; in_data = '0;
    #1 rst_n = 1'b0;
    #10 rst_n = 1'b1;
    // an abandoned partial word, discarded by clr
    for (int i = 0; i < 50; i++) begin
      @(negedge clk);
      in_valid = 1'b1; in_data = sym_t'($urandom); out_ready = 1'b1;
    end
    @(negedge clk);
    in_valid = 1'b0; clr = 1'b1;
    @(negedge clk);
    clr = 1'b0;
    while (c_out < NCW) begin
      @(negedge clk);
      in_valid  = (c_in < NCW) && ($urandom_range(0, 3) != 0);
      in_data   = (c_in < NCW) ? info[c_in][j_in] : 8'h00;
      out_ready = ($urandom_range(0, 3) != 0);
      #1;
      if (c_out < NCW && j_out >= K) check(!in_ready, "in_ready during parity");
      if (in_valid && in_ready) begin
        j_in++;
        if (j_in == K) begin j_in = 0; c_in++; end
      end
      if (out_valid && out_ready) begin
        check(out_data == expc[c_out][j_out],
              $sformatf("word %0d symbol %0d: %02h expected %02h", c_out, j_out, out_data, expc[c_out][j_out]));
        check(out_sync == (j_out == 0), "out_sync");
        check(out_parity == (j_out >= K), "out_parity");
        j_out++;
        if (j_out == N) begin j_out = 0; c_out++; end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
