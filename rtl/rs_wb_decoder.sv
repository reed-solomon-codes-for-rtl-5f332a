// rs_wb_decoder: hard-decision RS(255,239) decoder built on the modified
// Welch-Berlekamp algorithm.
//
// Unlike a syndrome-based decoder it starts from the remainder of the
// received word: three stages work on three consecutive codewords at once.
//   1. rs_reencoder divides the received word by g(x) while the symbols
//      arrive; the word itself is written to rs_buffer.
//   2. wb_key_solver turns the 2T remainder symbols into the error locator
//      Q(x) and the error evaluator N(x) in 8T clocks.
//   3. chien_error_eval searches the roots of Q(x) while the buffered word
//      is read out, and adds e_i = N/(f Q') to every data symbol in error.
//      The error-value formula does not hold at parity positions, so the
//      parity is rebuilt instead: the corrected data symbols run through an
//      rs_encoder, whose parity replaces the received parity symbols.
//
// Ports (after the decoder's pin list; the data output is named dout because
// "do" is a keyword):
//   clk          rising edge clock
//   reset_n      asynchronous active-low reset
//   reset_sync_n synchronous active-low reset
//   di, di_rdy   input symbol and its valid flag
//   di_sync_in   first symbol of a codeword (also re-synchronises mid-word)
//   di_acpt      the decoder takes di in this cycle (di_rdy && di_acpt)
//   dout, do_rdy output symbol and its valid flag
//   do_acpt      the receiver takes dout in this cycle
//   do_sync_out  first symbol of an output codeword
//   do_error     this symbol was corrected (data or rebuilt parity)
//   do_parity_n  low at the 2T parity positions
// Symbols are in transmission order, highest-degree coefficient first.
// Symbols that arrive before the first di_sync_in after reset are dropped.
//
// Timing: the stages hand a codeword on as soon as the next stage is free,
// so a continuous stream runs at one symbol per clock with no stall; the
// first corrected symbol leaves N + 8T + 3 clocks after the first received
// one. di_acpt goes low only on the last symbol of a codeword while the
// solver still holds an earlier result that the output stage has not taken,
// i.e. when do_acpt back-pressure has filled all three buffer banks.
module rs_wb_decoder
  import rs_pkg::*;
#(
  parameter int unsigned T = T_DEF,        // error correcting capability
  parameter int unsigned N = NFIELD        // code length (2^8 - 1)
) (
  input  logic clk,
  input  logic reset_n,
  input  logic reset_sync_n,
  input  gf_t  di,
  input  logic di_rdy,
  input  logic di_sync_in,
  output logic di_acpt,
  output gf_t  dout,
  output logic do_rdy,
  input  logic do_acpt,
  output logic do_sync_out,
  output logic do_error,
  output logic do_parity_n
);
  localparam int unsigned P     = 2 * T;
  localparam int unsigned CW    = $clog2(N);
  localparam int unsigned BANKS = 3;
  localparam int unsigned BW    = $clog2(BANKS);

  typedef enum logic [1:0] {WB_IDLE, WB_RUN, WB_HOLD} wb_state_e;

  logic srst;
  assign srst = !reset_sync_n;

  // ---------------- stage 1: input, buffer write, re-encoding -------------
  logic          in_frame;
  logic [CW-1:0] in_cnt, in_idx;
  logic [BW-1:0] wr_bank, rd_bank;
  logic          fire_in, use_sym, in_last;
  gf_t           r_vec [P];
  logic          re_done;
  wb_state_e     wb_state;

  assign di_acpt = !(in_frame && in_cnt == CW'(N - 1) && wb_state != WB_IDLE);
  assign fire_in = di_rdy && di_acpt;
  assign use_sym = fire_in && (in_frame || di_sync_in);
  assign in_idx  = di_sync_in ? '0 : in_cnt;
  assign in_last = use_sym && (in_idx == CW'(N - 1));

  rs_reencoder #(.T(T), .N(N)) u_reenc (
    .clk, .rst_n(reset_n), .srst,
    .sym_valid(use_sym), .sym_first(use_sym && di_sync_in), .sym_data(di),
    .r_vec, .done(re_done)
  );

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      in_frame <= 1'b0;
      in_cnt   <= '0;
      wr_bank  <= '0;
    end else if (srst) begin
      in_frame <= 1'b0;
      in_cnt   <= '0;
      wr_bank  <= '0;
    end else if (use_sym) begin
      in_frame <= 1'b1;
      if (in_last) begin
        in_cnt  <= '0;
        wr_bank <= (wr_bank == BW'(BANKS - 1)) ? '0 : wr_bank + 1'b1;
      end else begin
        in_cnt <= in_idx + 1'b1;
      end
    end
  end

  // ---------------- stage 2: key equation -----------------------------------
  gf_t        q_poly [T+1];
  gf_t        n_poly [T];
  logic       wb_busy, wb_done, wb_step;
  wb_branch_e wb_branch;
  logic       s3_active, s3_load, s3_adv, s3_finish;

  wb_key_solver #(.T(T)) u_wb (
    .clk, .rst_n(reset_n), .srst,
    .start(re_done), .r_in(r_vec),
    .busy(wb_busy), .done(wb_done),
    .q_out(q_poly), .n_out(n_poly),
    .step_valid(wb_step), .step_branch(wb_branch)
  );

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n)     wb_state <= WB_IDLE;
    else if (srst)    wb_state <= WB_IDLE;
    else unique case (wb_state)
      WB_IDLE: if (re_done) wb_state <= WB_RUN;
      WB_RUN:  if (wb_done) wb_state <= WB_HOLD;
      WB_HOLD: if (s3_load) wb_state <= WB_IDLE;
      default: wb_state <= WB_IDLE;
    endcase
  end

  // ---------------- stage 3: Chien search, error value, output ----------------
  logic [CW-1:0] pos;
  logic          is_parity, err_found, fix;
  gf_t           err_val, buf_data;

  assign s3_adv    = s3_active && do_acpt;
  assign s3_finish = s3_adv && (pos == '0);
  assign s3_load   = (wb_state == WB_HOLD) && (!s3_active || s3_finish);

  chien_error_eval #(.T(T), .N(N)) u_chien (
    .clk, .rst_n(reset_n),
    .load(s3_load), .q_in(q_poly), .n_in(n_poly),
    .advance(s3_adv),
    .pos, .is_parity, .err_found, .err_val
  );

  rs_buffer #(.N(N), .BANKS(BANKS)) u_buf (
    .clk,
    .we(use_sym), .wbank(wr_bank), .widx(in_idx), .wdata(di),
    .rbank(rd_bank), .ridx(CW'(N - 1) - pos), .rdata(buf_data)
  );

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      s3_active <= 1'b0;
      rd_bank   <= '0;
    end else if (srst) begin
      s3_active <= 1'b0;
      rd_bank   <= '0;
    end else begin
      if (s3_finish)
        rd_bank <= (rd_bank == BW'(BANKS - 1)) ? '0 : rd_bank + 1'b1;
      if (s3_load)        s3_active <= 1'b1;
      else if (s3_finish) s3_active <= 1'b0;
    end
  end

  // corrected data, then parity rebuilt from it
  gf_t  data_fixed, penc_data;
  logic penc_in_ready, penc_valid, penc_sync, penc_parity;

  assign fix        = s3_active && err_found && !is_parity;
  assign data_fixed = buf_data ^ (fix ? err_val : '0);

  rs_encoder #(.T(T), .N(N)) u_penc (
    .clk, .rst_n(reset_n), .clr(srst),
    .in_valid(s3_active), .in_ready(penc_in_ready), .in_data(data_fixed),
    .out_valid(penc_valid), .out_ready(s3_adv), .out_data(penc_data),
    .out_sync(penc_sync), .out_parity(penc_parity)
  );

  assign dout        = penc_data;
  assign do_rdy      = s3_active;
  assign do_sync_out = s3_active && (pos == CW'(N - 1));
  assign do_error    = s3_active && (is_parity ? (penc_data != buf_data) : fix);
  assign do_parity_n = !is_parity;

  // The parity encoder walks the output word in step with the Chien search.
  assert property (@(posedge clk) disable iff (srst)
                   s3_active |-> (penc_parity == is_parity && penc_sync == (pos == CW'(N - 1))
                                  && penc_valid && (penc_in_ready == (s3_adv && !is_parity))));

  // The solver is started only when it is free and always finishes within a
  // codeword period, so a remainder is never lost.
  assert property (@(posedge clk) disable iff (srst)
                   re_done |-> (wb_state == WB_IDLE && !wb_busy));
endmodule
