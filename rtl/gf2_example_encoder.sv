// gf2_example_encoder: the small binary systematic encoder for
// g(x) = 1 + x + x^3 used to introduce LFSR division.
//
// Three message bits b2, b1, b0 are shifted in, highest degree first. The
// feedback bit is the input XOR R2; R0 loads the feedback (g_0 = 1), R1 loads
// R0 XOR feedback (g_1 = 1), R2 loads R1 (g_2 = 0). After three shifts
// R2 R1 R0 hold the remainder of b(x)x^3 mod g(x):
//   R0 = b0+b2, R1 = b0+b1+b2, R2 = b1+b2.
// Interface: clear (synchronous) empties the register, shift with din moves
// one bit in; r = {R2, R1, R0}. Timing: one bit per clock.
module gf2_example_encoder (
  input  logic       clk,
  input  logic       rst_n,      // asynchronous, active low
  input  logic       clear,
  input  logic       shift,
  input  logic       din,
  output logic [2:0] r
);
  logic fb;
  assign fb = din ^ r[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     r <= '0;
    else if (clear) r <= '0;
    else if (shift) r <= {r[1], r[0] ^ fb, fb};
  end
endmodule
