// rs_link_top: the Reed-Solomon protected link, transmit and receive ends.
//
// The data source feeds the systematic RS(255,239) encoder; its codewords
// cross a communication channel or storage device (outside this design,
// where noise may corrupt symbols) and reach the Welch-Berlekamp decoder,
// which hands the corrected data to the sink. Both ends share one clock and
// one asynchronous reset; the channel side of each is brought out as ports
// (enc_out_* towards the channel, dec_di* from it), so the channel can be a
// wire, a memory or an error injector.
// The small GF(2) example encoder for g(x) = 1 + x + x^3 stands beside them
// with its own ports; it is independent of the link.
// Timing: see rs_encoder and rs_wb_decoder.
module rs_link_top
  import rs_pkg::*;
#(
  parameter int unsigned T = T_DEF,
  parameter int unsigned N = NFIELD
) (
  input  logic       clk,
  input  logic       reset_n,
  input  logic       reset_sync_n,
  // data source -> encoder
  input  logic       enc_in_valid,
  output logic       enc_in_ready,
  input  gf_t        enc_in_data,
  // encoder -> channel
  output logic       enc_out_valid,
  input  logic       enc_out_ready,
  output gf_t        enc_out_data,
  output logic       enc_out_sync,
  output logic       enc_out_parity,
  // channel -> decoder
  input  gf_t        dec_di,
  input  logic       dec_di_rdy,
  input  logic       dec_di_sync_in,
  output logic       dec_di_acpt,
  // decoder -> data sink
  output gf_t        dec_do,
  output logic       dec_do_rdy,
  input  logic       dec_do_acpt,
  output logic       dec_do_sync_out,
  output logic       dec_do_error,
  output logic       dec_do_parity_n,
  // GF(2) example encoder
  input  logic       ex_clear,
  input  logic       ex_shift,
  input  logic       ex_din,
  output logic [2:0] ex_r
);
  rs_encoder #(.T(T), .N(N)) u_enc (
    .clk, .rst_n(reset_n), .clr(!reset_sync_n),
    .in_valid(enc_in_valid), .in_ready(enc_in_ready), .in_data(enc_in_data),
    .out_valid(enc_out_valid), .out_ready(enc_out_ready), .out_data(enc_out_data),
    .out_sync(enc_out_sync), .out_parity(enc_out_parity)
  );

  rs_wb_decoder #(.T(T), .N(N)) u_dec (
    .clk, .reset_n, .reset_sync_n,
    .di(dec_di), .di_rdy(dec_di_rdy), .di_sync_in(dec_di_sync_in), .di_acpt(dec_di_acpt),
    .dout(dec_do), .do_rdy(dec_do_rdy), .do_acpt(dec_do_acpt),
    .do_sync_out(dec_do_sync_out), .do_error(dec_do_error), .do_parity_n(dec_do_parity_n)
  );

  gf2_example_encoder u_ex (
    .clk, .rst_n(reset_n), .clear(ex_clear), .shift(ex_shift), .din(ex_din), .r(ex_r)
  );
endmodule
