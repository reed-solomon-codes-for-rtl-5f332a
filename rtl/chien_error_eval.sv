// chien_error_eval: Chien search of Q(x) and error evaluation.
//
// After load, the circuit steps through the code positions i = N-1, N-2,
// ..., 0 (the order in which the decoder outputs symbols), one position per
// advance. Three register banks hold the coefficients of Q(x), N(x) and the
// constant f(x) = C g(x), each scaled so that register l holds
// c_l * alpha^(l*(i+1)). Multiplying register l by alpha^-l gives the term
// c_l alpha^(l*i) of the current position, and that product is written back
// on advance (Chien recursion; T, T-1 and 2T constant multipliers). Starting
// from the raw coefficients, the first position evaluated is alpha^-1 =
// alpha^254, i.e. position N-1 for N = 255.
//
//   err_found : Q(alpha^i) = 0, an error sits at position i
//   err_val   : e_i = N(alpha^i) / ( f(alpha^i) Q'(alpha^i) )
//               with Q'(x) = x^-1 * sum of the odd-degree terms of Q(x)
// err_val is meaningful at data positions (i >= 2T). At parity positions f
// vanishes; the decoder leaves those symbols uncorrected.
//
// Interface: load (q_in, n_in sampled), advance (move to the next lower
// position). pos, is_parity, err_found and err_val describe the current
// position and are combinational from the registers.
module chien_error_eval
  import rs_pkg::*;
#(
  parameter int unsigned T = T_DEF,
  parameter int unsigned N = NFIELD        // must equal 2^8 - 1
) (
  input  logic clk,
  input  logic rst_n,          // asynchronous, active low
  input  logic load,
  input  gf_t  q_in [T+1],
  input  gf_t  n_in [T],
  input  logic advance,
  output logic [$clog2(N)-1:0] pos,
  output logic is_parity,
  output logic err_found,
  output gf_t  err_val
);
  localparam int unsigned P  = 2 * T;
  localparam int unsigned CW = $clog2(N);

  typedef gf_t ftab_t [P+1];
  function automatic ftab_t mk_ftab();
    ftab_t t;
    for (int unsigned l = 0; l <= P; l++) t[l] = wb_f_coef(P, l);
    return t;
  endfunction
  localparam ftab_t FTAB = mk_ftab();   // f(x) = C g(x)

  gf_t qr [T+1], qt [T+1];
  gf_t nr [T],   nt [T];
  gf_t fr [P+1], ft [P+1];
  gf_t xr, xt;                 // alpha^i of the current position
  gf_t q_val, q_odd, n_val, f_val, den, den_inv, xn, num;

  // term_l = reg_l * alpha^-l ; alpha^-l = alpha^(255-l)
  assign qt[0] = qr[0];
  for (genvar l = 1; l <= T; l++) begin : g_q
    gf_mult u_q (.a(qr[l]), .b(gf_alpha_pow(NFIELD - l)), .p(qt[l]));
  end
  assign nt[0] = nr[0];
  for (genvar l = 1; l < T; l++) begin : g_n
    gf_mult u_n (.a(nr[l]), .b(gf_alpha_pow(NFIELD - l)), .p(nt[l]));
  end
  assign ft[0] = fr[0];
  for (genvar l = 1; l <= P; l++) begin : g_f
    gf_mult u_f (.a(fr[l]), .b(gf_alpha_pow(NFIELD - l)), .p(ft[l]));
  end
  gf_mult u_x (.a(xr), .b(gf_alpha_pow(NFIELD - 1)), .p(xt));

  always_comb begin
    q_val = '0;
    q_odd = '0;
    for (int l = 0; l <= T; l++) begin
      q_val = q_val ^ qt[l];
      if (l % 2 == 1) q_odd = q_odd ^ qt[l];
    end
    n_val = '0;
    for (int l = 0; l < T; l++) n_val = n_val ^ nt[l];
    f_val = '0;
    for (int l = 0; l <= P; l++) f_val = f_val ^ ft[l];
  end

  // e = alpha^i * N / (f * Qodd)
  gf_mult u_den (.a(f_val), .b(q_odd), .p(den));
  gf_inv  u_inv (.a(den),   .y(den_inv));
  gf_mult u_xn  (.a(xt),    .b(n_val), .p(xn));
  gf_mult u_num (.a(xn),    .b(den_inv), .p(num));

  assign err_found = (q_val == '0);
  assign err_val   = num;
  assign is_parity = (pos < CW'(P));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos <= '0;
      xr  <= 8'h01;
      for (int l = 0; l <= T; l++) qr[l] <= '0;
      for (int l = 0; l < T; l++)  nr[l] <= '0;
      for (int l = 0; l <= P; l++) fr[l] <= '0;
    end else if (load) begin
      pos <= CW'(N - 1);
      xr  <= 8'h01;
      for (int l = 0; l <= T; l++) qr[l] <= q_in[l];
      for (int l = 0; l < T; l++)  nr[l] <= n_in[l];
      for (int l = 0; l <= P; l++) fr[l] <= FTAB[l];
    end else if (advance) begin
      pos <= pos - 1'b1;
      xr  <= xt;
      for (int l = 0; l <= T; l++) qr[l] <= qt[l];
      for (int l = 0; l < T; l++)  nr[l] <= nt[l];
      for (int l = 0; l <= P; l++) fr[l] <= ft[l];
    end
  end
endmodule
