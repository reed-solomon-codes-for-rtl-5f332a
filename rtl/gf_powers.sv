// gf_powers: the powers alpha_k^0 .. alpha_k^T of a field element.
//
// Used by the Welch-Berlekamp solver to evaluate Q, N, W and V at the check
// location alpha_k in one cycle. Following the finite-field exponentiation
// scheme of the decoder, the powers 2, 4 and 8 come from fixed linear XOR
// maps (squaring matrices) and the odd powers from a few multipliers:
//   a^2 = sq(a), a^4 = pow4(a), a^8 = pow8(a),
//   a^3 = a^2*a, a^5 = a^4*a, a^6 = sq(a^3), a^7 = a^6*a.
// For T = 8 that is 3 multiplications, fewer than the 7 of a plain chain.
// For T other than 8 the higher powers continue as a plain product chain
// (pw[i] = pw[i-1] * a for i > 8).
// Interface: a in, pw[0..T] out with pw[0] = 1. Timing: combinational.
module gf_powers
  import rs_pkg::*;
#(
  parameter int unsigned T = T_DEF
) (
  input  gf_t a,
  output gf_t pw [T+1]
);
  localparam int unsigned NP = (T > 8) ? T : 8;

  gf_t p2, p3, p4, p5, p6, p7, p8;
  gf_t ext [NP+1];   // ext[i] = a^i for i > 8 (plain product chain)

  assign p2 = gf_sq_f(a);
  assign p4 = gf_pow4_f(a);
  assign p8 = gf_pow8_f(a);
  gf_mult u_m3 (.a(p2), .b(a), .p(p3));
  gf_mult u_m5 (.a(p4), .b(a), .p(p5));
  assign p6 = gf_sq_f(p3);
  gf_mult u_m7 (.a(p6), .b(a), .p(p7));

  assign ext[8] = p8;
  for (genvar i = 9; i <= NP; i++) begin : g_chain
    gf_mult u_mc (.a(ext[i-1]), .b(a), .p(ext[i]));
  end

  for (genvar i = 0; i <= T; i++) begin : g_out
    if (i == 0)      begin : g_0 assign pw[i] = 8'h01; end
    else if (i == 1) begin : g_1 assign pw[i] = a;  end
    else if (i == 2) begin : g_2 assign pw[i] = p2; end
    else if (i == 3) begin : g_3 assign pw[i] = p3; end
    else if (i == 4) begin : g_4 assign pw[i] = p4; end
    else if (i == 5) begin : g_5 assign pw[i] = p5; end
    else if (i == 6) begin : g_6 assign pw[i] = p6; end
    else if (i == 7) begin : g_7 assign pw[i] = p7; end
    else             begin : g_h assign pw[i] = ext[i]; end
  end
endmodule
