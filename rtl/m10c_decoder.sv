// m10c_decoder -- on-chip decompressor for modified-10C coded test data.
//
// The tester sends the compressed stream one bit at a time (ate_bit with an
// ate_valid/ate_ready handshake; ate_ready is the decoder's C_ia line that
// holds the tester while constant bits are produced). The decoder rebuilds
// the original scan data and delivers it one bit at a time to the scan chain
// (scan_out with scan_valid, taken when scan_ready, the T_clk enable, is high).
// Code format: see m10c_pkg. Structure, after the published block diagram:
//   m10c_fsm         controller (8 states)
//   m10c_code_reg    n-bit codeword register (cleared by rst_data)
//   m10c_code_dec    n-bit codeword decoder
//   m10c_counter_dc  Counter_DC, decoded bits left in the block
//   m10c_bit_mux x2  bit selectors for the first and the second half-block
//   m10c_out_buffer  b-bit buffer towards the scan chain
//   m10c_code_stats  counters of length-8 and length->8 codewords, per block
//                    class and per run length
// Timing: one clock per accepted codeword bit that is not a literal, plus one
// clock per decoded bit; literal bits are accepted and written in the same
// clock. With a free-running tester and scan side, a codeword of c non-literal
// bits that decodes to s bits takes c + s clocks; the first decoded bit
// reaches scan_out one clock after it is written. Single clock domain: the
// tester and scan clocks of the published diagram are taken as clock enables.
module m10c_decoder
  import m10c_pkg::*;
#(
  parameter int unsigned B       = 16,  // output buffer depth, bits
  parameter int unsigned STATS_W = 32   // occurrence counter width
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               enable,
  // tester
  input  logic               ate_bit,
  input  logic               ate_valid,
  output logic               ate_ready,
  // scan chain
  output logic               scan_out,
  output logic               scan_valid,
  input  logic               scan_ready,
  // status
  input  logic               stats_clr,
  output logic [STATS_W-1:0] n_blk8,
  output logic [STATS_W-1:0] n_run,
  output logic [N_CLS-1:0][STATS_W-1:0] n_cls,   // per block class (blk_cls_t)
  output logic [N_LEN-1:0][STATS_W-1:0] n_len,   // per run length, index = length - 9
  output logic               busy
);

  logic                   reg_clr, reg_shift, is_run;
  logic [CODE_N-1:0]      code_q, code_peek;
  logic [$clog2(CODE_N+1)-1:0] code_cnt, code_peek_cnt;
  logic                   dec_done, dec_err;
  size_t                  dec_size, cnt_load_val, cnt_count;
  src_t                   dec_h1, dec_h2, h1_src, h2_src;
  blk_cls_t               dec_cls;
  logic                   cnt_load, cnt_dec, cnt_last, cnt_half_last;
  logic                   sel_h2, buf_wr, buf_full;
  logic                   bit_h1, bit_h2, lit_h1, lit_h2;
  logic                   blk8_evt, run_evt;
  state_t                 state;

  m10c_fsm u_fsm (
    .clk, .rst_n, .enable,
    .ate_valid, .ate_bit, .ate_ready,
    .reg_clr, .reg_shift, .is_run,
    .dec_done, .dec_size, .dec_h1, .dec_h2,
    .cnt_load, .cnt_load_val, .cnt_dec, .cnt_last, .cnt_half_last,
    .h1_src, .h2_src, .sel_h2, .buf_wr, .buf_full,
    .blk8_evt, .run_evt, .state
  );

  m10c_code_reg #(.N(CODE_N)) u_code_reg (
    .clk, .rst_n, .clr(reg_clr), .shift(reg_shift), .din(ate_bit),
    .q(code_q), .cnt(code_cnt), .peek(code_peek), .peek_cnt(code_peek_cnt)
  );

  m10c_code_dec u_code_dec (
    .is_run, .bits(code_peek), .nbits(3'(code_peek_cnt)),
    .done(dec_done), .err(dec_err), .blk_size(dec_size),
    .h1_src(dec_h1), .h2_src(dec_h2), .blk_cls(dec_cls)
  );

  m10c_counter_dc u_counter_dc (
    .clk, .rst_n, .load(cnt_load), .load_val(cnt_load_val), .dec(cnt_dec),
    .count(cnt_count), .last(cnt_last), .half_last(cnt_half_last)
  );

  m10c_bit_mux u_mux_h1 (.src(h1_src), .lit(ate_bit), .bit_out(bit_h1), .need_lit(lit_h1));
  m10c_bit_mux u_mux_h2 (.src(h2_src), .lit(ate_bit), .bit_out(bit_h2), .need_lit(lit_h2));

  m10c_out_buffer #(.B(B)) u_buffer (
    .clk, .rst_n, .wr(buf_wr), .wr_bit(sel_h2 ? bit_h2 : bit_h1), .full(buf_full),
    .scan_ready, .scan_valid, .scan_out
  );

  m10c_code_stats #(.W(STATS_W)) u_stats (
    .clk, .rst_n, .clr(stats_clr),
    .blk8_evt, .blk_cls(dec_cls), .run_evt, .run_size(dec_size),
    .n_blk8, .n_run, .n_cls, .n_len
  );

  // Busy while a codeword is being decoded or decoded bits wait in the buffer.
  assign busy = !(state inside {S_IDLE, S_DETECT}) || scan_valid;

  // A literal state always uses the mux whose half takes tester bits, and a
  // complete 4-bit block prefix is always a valid one.
  a_lit_src: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_H1_LIT |-> lit_h1) and (state == S_H2_LIT |-> lit_h2));
  a_no_bad_prefix: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_PREFIX && reg_shift) |-> !dec_err);

endmodule
