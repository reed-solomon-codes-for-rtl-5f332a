// rs_buffer: codeword buffer of the decoder.
//
// Holds the received symbols of up to BANKS codewords while they move
// through re-encoding, the key-equation solver and correction. One bank per
// codeword, N symbols per bank, addressed by (bank, index) with index 0 the
// first symbol received. One synchronous write port, one combinational read
// port (distributed-RAM style), so the corrected symbol can be formed in the
// same cycle the reader asks for it.
module rs_buffer
  import rs_pkg::*;
#(
  parameter int unsigned N     = NFIELD,
  parameter int unsigned BANKS = 3
) (
  input  logic clk,
  input  logic we,
  input  logic [$clog2(BANKS)-1:0] wbank,
  input  logic [$clog2(N)-1:0]     widx,
  input  gf_t  wdata,
  input  logic [$clog2(BANKS)-1:0] rbank,
  input  logic [$clog2(N)-1:0]     ridx,
  output gf_t  rdata
);
  gf_t mem [BANKS * N];

  always_ff @(posedge clk)
    if (we) mem[int'(wbank) * N + int'(widx)] <= wdata;

  assign rdata = mem[int'(rbank) * N + int'(ridx)];
endmodule
