// tb_rs_link_top: end-to-end test of the RS(255,239) link at full size.
//
// Phase 1 sends random information blocks through the encoder with random
// stalls on both of its handshakes and checks every codeword: the data part
// is the information unchanged and the codeword polynomial vanishes at
// alpha^0 .. alpha^15 (reference arithmetic from tb_gf_pkg).
// Phase 2 corrupts the codewords (0 to 8 symbol errors, in data and parity
// positions) and streams them through the decoder, with idle input cycles,
// output back-pressure, symbols before the first sync (dropped), an aborted
// word followed by re-synchronisation, and a synchronous reset. Every output
// symbol (parity included) and flag is compared with the transmitted codeword. The latency of
// the first word is checked against N + 8T + 3 clocks and a continuous
// stream must not stall. Each decoder mechanism is counted and must occur:
// solver branches A, B and C, data corrections, rebuilt parity symbols,
// input stall, output back-pressure, resync, dropped symbols, sync reset.
// The GF(2) example encoder is checked against its shift table.
module tb_rs_link_top;
  import tb_gf_pkg::*;

  localparam int N = 255, K = 239, P = 16, NCW = 14;
  localparam int LATENCY = N + 8 * 8 + 3;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic reset_n, reset_sync_n;
  logic enc_in_valid, enc_in_ready, enc_out_valid, enc_out_ready, enc_out_sync, enc_out_parity;
  sym_t enc_in_data, enc_out_data;
  sym_t dec_di, dec_do;
  logic dec_di_rdy, dec_di_sync_in, dec_di_acpt;
  logic dec_do_rdy, dec_do_acpt, dec_do_sync_out, dec_do_error, dec_do_parity_n;
  logic ex_clear, ex_shift, ex_din;
  logic [2:0] ex_r;

  rs_link_top u_top (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_br_a = 0, n_br_b = 0, n_br_c = 0;
  always @(posedge clk)
    if (u_top.u_dec.u_wb.step_valid) begin
      case (u_top.u_dec.u_wb.step_branch)
        rs_pkg::WB_BR_A: n_br_a++;
        rs_pkg::WB_BR_B: n_br_b++;
        default:         n_br_c++;
      endcase
    end

  sym_t info   [NCW][K];
  sym_t cw     [NCW][N];     // transmitted, index j = degree N-1-j
  sym_t rx     [NCW][N];     // received
  bit   errpos [NCW][N];
  int   nerr   [NCW];

  function automatic sym_t eval_cw(int c, sym_t x);
    sym_t acc = 8'h00;
    for (int j = 0; j < N; j++) acc = ref_mul(acc, x) ^ cw[c][j];
    return acc;
  endfunction

  // ---------------- phase 1: encoder ----------------
  task automatic run_encoder();
    int c_in = 0, j_in = 0, c_out = 0, j_out = 0;
    while (c_out < NCW) begin
      @(negedge clk);
      enc_in_valid  = (c_in < NCW) && ($urandom_range(0, 3) != 0);
      enc_in_data   = (c_in < NCW) ? info[c_in][j_in] : 8'h00;
      enc_out_ready = ($urandom_range(0, 4) != 0);
      #1;
      if (enc_in_valid && enc_in_ready) begin
        j_in++;
        if (j_in == K) begin j_in = 0; c_in++; end
      end
      if (enc_out_valid && enc_out_ready) begin
        cw[c_out][j_out] = enc_out_data;
        check(enc_out_sync == (j_out == 0), "encoder out_sync");
        check(enc_out_parity == (j_out >= K), "encoder out_parity");
        if (j_out < K) check(enc_out_data == info[c_out][j_out], "encoder data passthrough");
        j_out++;
        if (j_out == N) begin j_out = 0; c_out++; end
      end
    end
    @(negedge clk);
    enc_in_valid = 1'b0;
    for (int c = 0; c < NCW; c++)
      for (int i = 0; i < P; i++)
        check(eval_cw(c, ref_alpha(i)) == 8'h00, $sformatf("codeword %0d root alpha^%0d", c, i));
  endtask

  // ---------------- channel: error patterns ----------------
  task automatic make_errors();
    for (int c = 0; c < NCW; c++) begin
      int ne, kind;
      for (int j = 0; j < N; j++) errpos[c][j] = 1'b0;
      case (c)
        0: begin ne = 0; kind = 0; end   // clean
        1: begin ne = 1; kind = 1; end   // one data error
        2: begin ne = 8; kind = 1; end   // t data errors
        3: begin ne = 8; kind = 0; end   // t errors anywhere
        4: begin ne = 3; kind = 2; end   // parity only
        5: begin ne = 8; kind = 3; end   // 4 parity + 4 data
        default: begin ne = $urandom_range(0, 8); kind = 0; end
      endcase
      nerr[c] = ne;
      for (int e = 0; e < ne; e++) begin
        int j;
        do begin
          case (kind)
            1: j = $urandom_range(0, K - 1);
            2: j = $urandom_range(K, N - 1);
            3: j = (e < 4) ? $urandom_range(K, N - 1) : $urandom_range(0, K - 1);
            default: j = $urandom_range(0, N - 1);
          endcase
        end while (errpos[c][j]);
        errpos[c][j] = 1'b1;
      end
      for (int j = 0; j < N; j++)
        rx[c][j] = errpos[c][j] ? (cw[c][j] ^ sym_t'($urandom_range(1, 255))) : cw[c][j];
    end
  endtask

  // ---------------- phase 2: decoder ----------------
  int n_stall_cont = 0, n_stall = 0, n_bp = 0, n_resync = 0, n_drop = 0, n_srst = 0;
  int n_fix = 0, n_par_err = 0, n_clean = 0;
  int t_first_in = -1, t_first_out = -1;
  bit gaps_on = 1'b0;

  // drive one symbol; returns when it has been taken
  task automatic send(input sym_t d, input bit sync);
    bit done = 1'b0;
    while (!done) begin
      @(negedge clk);
      dec_di_rdy     = !gaps_on || ($urandom_range(0, 3) != 0);
      dec_di         = d;
      dec_di_sync_in = sync;
      #1;
      if (dec_di_rdy && !dec_di_acpt) n_stall++;
      if (dec_di_rdy && dec_di_acpt) begin
        done = 1'b1;
      end
    end
    @(negedge clk);
    dec_di_rdy = 1'b0;
    dec_di_sync_in = 1'b0;
  endtask

  // stream one codeword (back to back, no idle cycle between symbols)
  task automatic send_word(int c);
    int j = 0;
    while (j < N) begin
      @(negedge clk);
      dec_di_rdy     = !gaps_on || ($urandom_range(0, 3) != 0);
      dec_di         = rx[c][j];
      dec_di_sync_in = (j == 0);
      #1;
      if (dec_di_rdy && !dec_di_acpt) n_stall++;
      if (dec_di_rdy && !dec_di_acpt && !gaps_on) n_stall_cont++;
      if (dec_di_rdy && dec_di_acpt) begin
        if (c == 0 && j == 0) t_first_in = cyc;
        j++;
      end
    end
  endtask

  task automatic feeder();
    // symbols before any sync are dropped
    for (int i = 0; i < 5; i++) begin send(sym_t'($urandom), 1'b0); n_drop++; end
    // a partial word, then a synchronous reset discards it
    send(8'h5A, 1'b1);
    for (int i = 0; i < 40; i++) send(sym_t'($urandom), 1'b0);
    @(negedge clk);
    reset_sync_n = 1'b0;
    @(negedge clk);
    reset_sync_n = 1'b1;
    n_srst++;
    for (int c = 0; c < NCW; c++) begin
      if (c == 3) begin
        // an aborted word: sync, 100 symbols, then sync again with word 3
        for (int i = 0; i < 100; i++) send_word_sym(sym_t'($urandom), i == 0);
        n_resync++;
      end
      gaps_on = (c >= 6);
      send_word(c);
    end
    @(negedge clk);
    dec_di_rdy = 1'b0;
    dec_di_sync_in = 1'b0;
  endtask

  task automatic send_word_sym(input sym_t d, input bit sync);
    bit done = 1'b0;
    while (!done) begin
      @(negedge clk);
      dec_di_rdy = 1'b1;
      dec_di = d;
      dec_di_sync_in = sync;
      #1;
      if (dec_di_acpt) done = 1'b1;
      else n_stall++;
    end
  endtask

  task automatic sink();
    int c = 0, j = 0;
    int total = 0;
    while (c < NCW) begin
      @(negedge clk);
      if (total == 6 * N + 10) begin
        // long pause: the decoder must back up into its input
        dec_do_acpt = 1'b0;
        repeat (700) begin
          @(negedge clk);
          #1;
          if (dec_do_rdy) n_bp++;
        end
        @(negedge clk);
      end
      dec_do_acpt = (c < 6) ? 1'b1 : ($urandom_range(0, 4) != 0);
      #1;
      if (dec_do_rdy && !dec_do_acpt) n_bp++;
      if (dec_do_rdy && dec_do_acpt) begin
        sym_t exp_d;
        bit   exp_err;
        if (t_first_out < 0) t_first_out = cyc;
        exp_d   = cw[c][j];
        exp_err = errpos[c][j];
        check(dec_do == exp_d, $sformatf("decoder word %0d symbol %0d: got %02h exp %02h", c, j, dec_do, exp_d));
        check(dec_do_error == exp_err, $sformatf("do_error word %0d symbol %0d", c, j));
        check(dec_do_parity_n == (j < K), "do_parity_n");
        check(dec_do_sync_out == (j == 0), "do_sync_out");
        if (dec_do_error) n_fix++;
        if (errpos[c][j] && j >= K && dec_do_error) n_par_err++;
        j++;
        total++;
        if (j == N) begin
          if (nerr[c] == 0) n_clean++;
          j = 0;
          c++;
        end
      end
    end
  endtask

  initial begin
    reset_n = 1'b1;
    #1 reset_n = 1'b0;
    reset_sync_n = 1'b1;
    enc_in_valid = 1'b0; enc_in_data = '0; enc_out_ready = 1'b0;
    dec_di = '0; dec_di_rdy = 1'b0; dec_di_sync_in = 1'b0; dec_do_acpt = 1'b1;
    ex_clear = 1'b0; ex_shift = 1'b0; ex_din = 1'b0;
    for (int c = 0; c < NCW; c++)
      for (int j = 0; j < K; j++) info[c][j] = sym_t'($urandom);
    repeat (3) @(posedge clk);
    @(negedge clk);
    reset_n = 1'b1;

    // GF(2) example: remainder of b(x)x^3 mod 1+x+x^3
    for (int b = 0; b < 8; b++) begin
      logic [2:0] bb, exp_r;
      bb = 3'(b);
      @(negedge clk); ex_clear = 1'b1;
      @(negedge clk); ex_clear = 1'b0;
      for (int s = 2; s >= 0; s--) begin
        ex_shift = 1'b1; ex_din = bb[s];
        @(negedge clk);
      end
      ex_shift = 1'b0;
      exp_r[0] = bb[0] ^ bb[2];
      exp_r[1] = bb[0] ^ bb[1] ^ bb[2];
      exp_r[2] = bb[1] ^ bb[2];
      check(ex_r == exp_r, "GF(2) example remainder");
    end

    run_encoder();
    make_errors();
    fork
      feeder();
      sink();
    join
    repeat (10) @(negedge clk);

    check(t_first_out - t_first_in == LATENCY,
          $sformatf("latency %0d, expected %0d", t_first_out - t_first_in, LATENCY));
    $display("mechanisms: branchA=%0d branchB=%0d branchC=%0d fixes=%0d parity_rebuilt=%0d clean=%0d stall=%0d backpressure=%0d resync=%0d dropped=%0d sync_reset=%0d",
             n_br_a, n_br_b, n_br_c, n_fix, n_par_err, n_clean, n_stall, n_bp, n_resync, n_drop, n_srst);
    check(n_stall_cont == 0, "continuous stream stalled");
    check(n_br_a > 0, "branch A never taken");
    check(n_br_b > 0, "branch B never taken");
    check(n_br_c > 0, "branch C never taken");
    check(n_fix > 0, "no correction");
    check(n_par_err > 0, "no parity symbol rebuilt");
    check(n_clean > 0, "no clean word");
    check(n_stall > 0, "input never stalled");
    check(n_bp > 0, "no output back-pressure");
    check(n_resync > 0, "no resync");
    check(n_drop > 0, "no dropped symbols");
    check(n_srst > 0, "no sync reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
