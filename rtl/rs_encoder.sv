// rs_encoder: systematic Reed-Solomon encoder, RS(N, N-2T) over GF(2^8).
//
// The K = N-2T information symbols are sent unchanged, highest-degree
// coefficient first, and at the same time divided by the generator
// polynomial g(x) = prod_{i=0}^{2T-1} (x - alpha^i) in a 2T-stage linear
// feedback shift register: feedback = input XOR last stage, stage 0 loads
// g_0*feedback, stage i loads stage(i-1) XOR g_i*feedback. After the K-th
// symbol the register holds the remainder of I(x)x^(2T) mod g(x), i.e. the
// parity symbols, which are then shifted out (highest degree first) with the
// feedback held at zero. The codeword is c(x) = I(x)x^(2T) + remainder.
//
// Interface: a valid/ready stream in (information symbols), a valid/ready
// stream out (the N codeword symbols). clr restarts the encoder at a codeword
// boundary. in_ready is low while parity symbols
// are being sent. out_sync marks the first symbol of each codeword and
// out_parity the 2T parity symbols. The output is combinational from the
// input during the information part (one symbol per cycle, no latency).
// The decoder reuses this module to rebuild the parity of corrected words.
// The output handshake is this design's choice; the structure is the
// generalised encoder of the RS encoder description.
module rs_encoder
  import rs_pkg::*;
#(
  parameter int unsigned T = T_DEF,        // symbols corrected; 2T parity symbols
  parameter int unsigned N = NFIELD        // code length
) (
  input  logic clk,
  input  logic rst_n,          // asynchronous, active low
  input  logic clr,            // synchronous clear: restart at a codeword boundary
  input  logic in_valid,
  output logic in_ready,
  input  gf_t  in_data,
  output logic out_valid,
  input  logic out_ready,
  output gf_t  out_data,
  output logic out_sync,
  output logic out_parity
);
  localparam int unsigned P = 2 * T;
  localparam int unsigned K = N - P;

  gf_t  s    [P];       // LFSR stages
  gf_t  gfb  [P];       // g_i * feedback
  gf_t  fb;
  logic [$clog2(N)-1:0] cnt;   // position of the next output symbol
  logic info_phase, fire;

  assign info_phase = (cnt < K[$clog2(N)-1:0]);
  assign in_ready   = info_phase && out_ready;
  assign out_valid  = info_phase ? in_valid : 1'b1;
  assign out_data   = info_phase ? in_data : s[P-1];
  assign out_sync   = (cnt == '0);
  assign out_parity = !info_phase;
  assign fire       = out_valid && out_ready;
  assign fb         = info_phase ? (in_data ^ s[P-1]) : '0;

  for (genvar i = 0; i < P; i++) begin : g_mul
    gf_mult u_g (.a(fb), .b(gen_poly_coef(P, i)), .p(gfb[i]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      for (int i = 0; i < P; i++) s[i] <= '0;
    end else if (clr) begin
      cnt <= '0;
      for (int i = 0; i < P; i++) s[i] <= '0;
    end else if (fire) begin
      s[0] <= gfb[0];
      for (int i = 1; i < P; i++) s[i] <= s[i-1] ^ gfb[i];
      cnt <= (cnt == N[$clog2(N)-1:0] - 1'b1) ? '0 : cnt + 1'b1;
    end
  end
endmodule
