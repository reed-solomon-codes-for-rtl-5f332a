// gf_mult: combinational GF(2^8) multiplier, p = a * b.
//
// Bit-parallel polynomial-basis multiplier: the partial products a*x^i are
// formed by repeated multiplication by x with reduction modulo
// p(x) = x^8 + x^4 + x^3 + x^2 + 1, and XORed where b[i] is set.
// It is the building block of every multiplier bank in the decoder (the
// decoder's multipliers are called Berlekamp multipliers in the original
// description, i.e. dual-basis bit-serial units; this design uses a one-cycle
// polynomial-basis multiplier in their place).
// Interface: a, b in, p out. Timing: purely combinational.
module gf_mult
  import rs_pkg::*;
(
  input  gf_t a,
  input  gf_t b,
  output gf_t p
);
  gf_t pp [M];   // pp[i] = a * x^i mod p(x)

  always_comb begin
    pp[0] = a;
    for (int i = 1; i < M; i++)
      pp[i] = pp[i-1][M-1] ? ((pp[i-1] << 1) ^ PRIM_POLY[M-1:0]) : (pp[i-1] << 1);
    p = '0;
    for (int i = 0; i < M; i++)
      if (b[i]) p = p ^ pp[i];
  end
endmodule
