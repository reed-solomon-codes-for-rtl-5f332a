// wb_key_solver: modified Welch-Berlekamp key-equation solver.
//
// Input: the 2T remainder coefficients r_0 .. r_(2T-1) of the re-encoder.
// Each is scaled to the check value R_k = r_k * G_k (G_k a constant table,
// see rs_pkg) and paired with the check location alpha_k = alpha^k. The
// solver finds Q(x) (error locator, degree <= T) and N(x) (degree < T) with
// Q(alpha_k) R_k = N(alpha_k) for every k, by processing the 2T pairs in turn
// while keeping a second pair of polynomials W(x), V(x):
//
//   start: Q=1, N=0, W=x, V=1, J=1
//   D1 = Q(alpha_k) R_k - N(alpha_k)
//   D1 = 0 (branch A): (W,V) <- (W,V)(x - alpha_k), J <- J+1
//   D1 != 0:          D2 = W(alpha_k) R_k - V(alpha_k)
//                     (Wt,Vt) = (W,V) + (D2/D1)(Q,N); (Qt,Nt) = (Q,N)(x - alpha_k)
//       J = 0 (branch C): (W,V) <- (Qt,Nt), (Q,N) <- (Wt,Vt), J <- 1
//       J > 0 (branch B): (W,V) <- (Wt,Vt), (Q,N) <- (Qt,Nt), J <- J-1
//
// J replaces the comparison of polynomial lengths L(W,V) - L(Q,N) of the
// original algorithm. Each pair takes four clocks on one shared multiplier
// bank (T+1 multipliers for Q/W, T for N/V):
//   phase 1  D1 and 1/D1,
//   phase 2  D2 and D2/D1,
//   phase 3  (W,V)(x - alpha_k) if D1 = 0, else (Qt,Nt),
//   phase 4  (Wt,Vt) and the choice of branch B or C.
// The powers alpha_k^0..alpha_k^T come from gf_powers. A solve therefore
// takes 8T clocks (64 for T = 8). Coefficients above degree T of W and
// T-1 of V are dropped; they only matter when more than T errors occurred.
//
// Interface: start (one cycle, r_in sampled) -> busy for 8T cycles -> done
// (one cycle). q_out/n_out hold the result until the next start.
// step_valid/step_branch report each processed pair (for observation).
module wb_key_solver
  import rs_pkg::*;
#(
  parameter int unsigned T = T_DEF
) (
  input  logic       clk,
  input  logic       rst_n,         // asynchronous, active low
  input  logic       srst,          // synchronous clear
  input  logic       start,
  input  gf_t        r_in  [2*T],
  output logic       busy,
  output logic       done,
  output gf_t        q_out [T+1],
  output gf_t        n_out [T],
  output logic       step_valid,
  output wb_branch_e step_branch
);
  localparam int unsigned P  = 2 * T;
  localparam int unsigned KW = $clog2(P);
  localparam int unsigned JW = $clog2(P + 2) + 1;

  typedef gf_t gtab_t [P];
  function automatic gtab_t mk_gtab();
    gtab_t t;
    for (int unsigned i = 0; i < P; i++) t[i] = wb_g_const(P, i);
    return t;
  endfunction
  localparam gtab_t GTAB = mk_gtab();

  typedef enum logic [2:0] {S_IDLE, S_PH1, S_PH2, S_PH3, S_PH4} state_e;
  state_e state;

  gf_t Q [T+1], W [T+1], Qt [T+1];
  gf_t Nn [T],  V [T],   Nt [T];
  gf_t rr [P];
  gf_t ak, d1, d1inv, ratio;
  logic [KW-1:0] k;
  logic [JW-1:0] J;

  // shared multiplier banks
  gf_t a_op [T+1], a_k [T+1], a_p [T+1];
  gf_t b_op [T],   b_k [T],   b_p [T];
  gf_t pw [T+1];
  gf_t a_sum, b_sum, rk, dr_a, dr_p, dcur, d1inv_c, ratio_c, ak_next;

  gf_powers #(.T(T)) u_pw (.a(ak), .pw(pw));

  for (genvar l = 0; l <= T; l++) begin : g_bank_a
    gf_mult u_a (.a(a_op[l]), .b(a_k[l]), .p(a_p[l]));
  end
  for (genvar l = 0; l < T; l++) begin : g_bank_b
    gf_mult u_b (.a(b_op[l]), .b(b_k[l]), .p(b_p[l]));
  end
  gf_mult u_rk    (.a(rr[k]), .b(GTAB[k]), .p(rk));        // R_k = r_k G_k
  gf_mult u_dr    (.a(dr_a),  .b(rk),      .p(dr_p));      // X(alpha_k) R_k
  gf_inv  u_inv   (.a(dcur),  .y(d1inv_c));                // 1/D1
  gf_mult u_ratio (.a(dcur),  .b(d1inv),   .p(ratio_c));   // D2/D1
  gf_mult u_alpha (.a(ak),    .b(8'h02),   .p(ak_next));   // alpha_(k+1)

  // operand selection per phase
  always_comb begin
    for (int l = 0; l <= T; l++) begin
      a_op[l] = Q[l];
      a_k[l]  = pw[l];
    end
    for (int l = 0; l < T; l++) begin
      b_op[l] = Nn[l];
      b_k[l]  = pw[l];
    end
    unique case (state)
      S_PH2: begin
        for (int l = 0; l <= T; l++) a_op[l] = W[l];
        for (int l = 0; l < T; l++)  b_op[l] = V[l];
      end
      S_PH3: begin
        for (int l = 0; l <= T; l++) begin
          a_op[l] = (d1 == '0) ? W[l] : Q[l];
          a_k[l]  = ak;
        end
        for (int l = 0; l < T; l++) begin
          b_op[l] = (d1 == '0) ? V[l] : Nn[l];
          b_k[l]  = ak;
        end
      end
      S_PH4: begin
        for (int l = 0; l <= T; l++) a_k[l] = ratio;
        for (int l = 0; l < T; l++)  b_k[l] = ratio;
      end
      default: ;
    endcase
    a_sum = '0;
    for (int l = 0; l <= T; l++) a_sum = a_sum ^ a_p[l];
    b_sum = '0;
    for (int l = 0; l < T; l++) b_sum = b_sum ^ b_p[l];
    dr_a = a_sum;
    dcur = dr_p ^ b_sum;            // D1 in phase 1, D2 in phase 2
  end

  assign busy  = (state != S_IDLE);
  for (genvar l = 0; l <= T; l++) begin : g_q_out
    assign q_out[l] = Q[l];
  end
  for (genvar l = 0; l < T; l++) begin : g_n_out
    assign n_out[l] = Nn[l];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      done <= 1'b0;
      step_valid <= 1'b0;
      step_branch <= WB_BR_A;
      k <= '0; J <= '0; ak <= 8'h01;
      d1 <= '0; d1inv <= '0; ratio <= '0;
      for (int l = 0; l <= T; l++) begin Q[l] <= '0; W[l] <= '0; Qt[l] <= '0; end
      for (int l = 0; l < T; l++)  begin Nn[l] <= '0; V[l] <= '0; Nt[l] <= '0; end
      for (int i = 0; i < P; i++) rr[i] <= '0;
    end else if (srst) begin
      state <= S_IDLE;
      done <= 1'b0;
      step_valid <= 1'b0;
    end else begin
      done <= 1'b0;
      step_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          for (int i = 0; i < P; i++) rr[i] <= r_in[i];
          for (int l = 0; l <= T; l++) begin Q[l] <= '0; W[l] <= '0; end
          for (int l = 0; l < T; l++)  begin Nn[l] <= '0; V[l] <= '0; end
          Q[0] <= 8'h01;              // Q = 1
          W[1] <= 8'h01;              // W = x
          V[0] <= 8'h01;              // V = 1, N = 0
          J  <= JW'(1);
          k  <= '0;
          ak <= 8'h01;                // alpha_0 = alpha^0
          state <= S_PH1;
        end
        S_PH1: begin
          d1    <= dcur;
          d1inv <= d1inv_c;
          state <= S_PH2;
        end
        S_PH2: begin
          ratio <= ratio_c;
          state <= S_PH3;
        end
        S_PH3: begin
          // multiply by (x - alpha_k): new_l = alpha_k * old_l + old_(l-1)
          if (d1 == '0) begin
            W[0] <= a_p[0];
            for (int l = 1; l <= T; l++) W[l] <= a_p[l] ^ W[l-1];
            V[0] <= b_p[0];
            for (int l = 1; l < T; l++)  V[l] <= b_p[l] ^ V[l-1];
          end else begin
            Qt[0] <= a_p[0];
            for (int l = 1; l <= T; l++) Qt[l] <= a_p[l] ^ Q[l-1];
            Nt[0] <= b_p[0];
            for (int l = 1; l < T; l++)  Nt[l] <= b_p[l] ^ Nn[l-1];
          end
          state <= S_PH4;
        end
        S_PH4: begin
          step_valid <= 1'b1;
          if (d1 == '0) begin
            J <= J + 1'b1;
            step_branch <= WB_BR_A;
          end else if (J == '0) begin
            for (int l = 0; l <= T; l++) begin W[l] <= Qt[l]; Q[l] <= W[l] ^ a_p[l]; end
            for (int l = 0; l < T; l++)  begin V[l] <= Nt[l]; Nn[l] <= V[l] ^ b_p[l]; end
            J <= JW'(1);
            step_branch <= WB_BR_C;
          end else begin
            for (int l = 0; l <= T; l++) begin W[l] <= W[l] ^ a_p[l]; Q[l] <= Qt[l]; end
            for (int l = 0; l < T; l++)  begin V[l] <= V[l] ^ b_p[l]; Nn[l] <= Nt[l]; end
            J <= J - 1'b1;
            step_branch <= WB_BR_B;
          end
          ak <= ak_next;
          if (k == KW'(P - 1)) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            k <= k + 1'b1;
            state <= S_PH1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
