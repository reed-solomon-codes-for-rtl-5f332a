// gf_inv: combinational GF(2^8) inverse, y = 1/a (y = 0 for a = 0).
//
// Computes a^254 = a^-1 with an addition chain of alternating squarings and
// multiplications: a^3, a^7, a^15, ..., a^127 are each formed as
// (previous)^2 * a, and a final squaring gives a^254. Squarings are the fixed
// XOR networks of rs_pkg::gf_sq_f; the six products use gf_mult instances.
// The decoder uses it for 1/D1 in the key-equation solver and for the
// division in the error value. Timing: purely combinational.
module gf_inv
  import rs_pkg::*;
(
  input  gf_t a,
  output gf_t y
);
  gf_t chain [7];   // chain[j] = a^(2^(j+1)-1)

  assign chain[0] = a;
  for (genvar j = 0; j < 6; j++) begin : g_step
    gf_mult u_mul (.a(gf_sq_f(chain[j])), .b(a), .p(chain[j+1]));
  end
  assign y = gf_sq_f(chain[6]);
endmodule
