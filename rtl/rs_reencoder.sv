// rs_reencoder: first decoding stage, the remainder r(x) of a received word.
//
// The received symbols v_(N-1) ... v_0 arrive highest degree first. For the
// K information symbols the circuit works exactly like the encoder, dividing
// by g(x) in a 2T-stage LFSR, so that after them it holds the parity r'(x)
// that the received information would have had. For the 2T received parity
// symbols the output switch closes: r_i = v_i + r'_i is produced, highest
// degree first, while the register shifts with zero feedback. The result is
// r(x) = v(x) mod g(x), which depends only on the error pattern, and r_i = 0
// for i >= 2T. No syndromes are computed.
//
// Interface: sym_valid/sym_data/sym_first (sym_first marks position N-1 and
// restarts the division). r_vec[i] holds r_i; it is complete when done pulses,
// one cycle after the last symbol, and is held until the next codeword's
// parity symbols arrive. Timing: one symbol per clock, no stall.
module rs_reencoder
  import rs_pkg::*;
#(
  parameter int unsigned T = T_DEF,
  parameter int unsigned N = NFIELD
) (
  input  logic clk,
  input  logic rst_n,          // asynchronous, active low
  input  logic srst,           // synchronous clear
  input  logic sym_valid,
  input  logic sym_first,
  input  gf_t  sym_data,
  output gf_t  r_vec [2*T],
  output logic done
);
  localparam int unsigned P = 2 * T;
  localparam int unsigned K = N - P;
  localparam int unsigned CW = $clog2(N);

  gf_t  s    [P];
  gf_t  s_in [P];       // stages as seen by this symbol (cleared on sym_first)
  gf_t  gfb  [P];
  gf_t  fb, r_sym;
  logic [CW-1:0] cnt, idx;
  logic info;

  assign idx  = sym_first ? '0 : cnt;
  assign info = (idx < K[CW-1:0]);
  always_comb
    for (int i = 0; i < P; i++) s_in[i] = sym_first ? '0 : s[i];
  assign r_sym = sym_data ^ s_in[P-1];
  assign fb    = info ? r_sym : '0;

  for (genvar i = 0; i < P; i++) begin : g_mul
    gf_mult u_g (.a(fb), .b(gen_poly_coef(P, i)), .p(gfb[i]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      done <= 1'b0;
      for (int i = 0; i < P; i++) begin
        s[i]     <= '0;
        r_vec[i] <= '0;
      end
    end else if (srst) begin
      cnt  <= '0;
      done <= 1'b0;
      for (int i = 0; i < P; i++) s[i] <= '0;
    end else begin
      done <= 1'b0;
      if (sym_valid) begin
        s[0] <= gfb[0];
        for (int i = 1; i < P; i++) s[i] <= s_in[i-1] ^ gfb[i];
        if (!info) r_vec[(N - 1) - int'(idx)] <= r_sym;
        if (idx == CW'(N - 1)) begin
          cnt  <= '0;
          done <= 1'b1;
        end else begin
          cnt <= idx + 1'b1;
        end
      end
    end
  end
endmodule
