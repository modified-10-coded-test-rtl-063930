// m10c_fsm -- controller of the modified-10C decoder.
//
// Eight states (m10c_pkg::state_t). From S_DETECT it takes the detect bit from
// the tester and clears the codeword register (rst_data). A 1 leads to
// S_RUNCODE, which shifts in the 4-bit run field; a 0 leads to S_PREFIX, which
// shifts in block-prefix bits until the codeword decoder reports a complete
// codeword. On that last codeword bit the block size is loaded into Counter_DC,
// the two half-block sources are latched and one occurrence event is raised.
// Then the block is written into the output buffer one bit per clock:
// S_H1_* for the first half (or the whole run), S_H2_* for the second half,
// *_CONST when the bits are constants (the tester is held off: ate_ready, the
// C_ia line, is low) and *_LIT when each bit is a tester bit passed through.
// Writing stalls while the buffer is full. After the last bit of the block the
// controller returns to S_DETECT; S_IDLE is left when `enable` is high and
// re-entered from S_DETECT when it drops.
// Tester handshake: a bit is taken in every clock where ate_valid && ate_ready.
// Each codeword therefore costs one clock per non-literal codeword bit plus
// one clock per decoded bit. The eight-state count, the detect-bit-first
// parsing and the stalling of the tester follow the published scheme; the
// valid/ready handshake and the state split are this design's choice.
module m10c_fsm
  import m10c_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   enable,
  // tester side
  input  logic   ate_valid,
  input  logic   ate_bit,
  output logic   ate_ready,
  // codeword register and decoder
  output logic   reg_clr,
  output logic   reg_shift,
  output logic   is_run,
  input  logic   dec_done,
  input  size_t  dec_size,
  input  src_t   dec_h1,
  input  src_t   dec_h2,
  // Counter_DC
  output logic   cnt_load,
  output size_t  cnt_load_val,
  output logic   cnt_dec,
  input  logic   cnt_last,
  input  logic   cnt_half_last,
  // half-block sources and output buffer
  output src_t   h1_src,
  output src_t   h2_src,
  output logic   sel_h2,
  output logic   buf_wr,
  input  logic   buf_full,
  // occurrence events
  output logic   blk8_evt,
  output logic   run_evt,
  output state_t state
);

  state_t nstate;
  logic   take;      // a tester bit is accepted this clock
  logic   wr_ok;     // a decoded bit is written this clock

  always_comb begin
    nstate       = state;
    ate_ready    = 1'b0;
    reg_clr      = 1'b0;
    reg_shift    = 1'b0;
    cnt_load     = 1'b0;
    cnt_load_val = dec_size;
    cnt_dec      = 1'b0;
    buf_wr       = 1'b0;
    blk8_evt     = 1'b0;
    run_evt      = 1'b0;
    sel_h2       = (state == S_H2_CONST) || (state == S_H2_LIT);
    take         = 1'b0;
    wr_ok        = 1'b0;

    unique case (state)
      S_IDLE: begin
        if (enable) nstate = S_DETECT;
      end
      S_DETECT: begin
        ate_ready = enable;
        take      = ate_valid && enable;
        if (!enable) nstate = S_IDLE;
        else if (take) begin
          reg_clr = 1'b1;
          nstate  = ate_bit ? S_RUNCODE : S_PREFIX;
        end
      end
      S_RUNCODE, S_PREFIX: begin
        ate_ready = 1'b1;
        take      = ate_valid;
        if (take) begin
          reg_shift = 1'b1;
          if (dec_done) begin
            cnt_load = 1'b1;
            run_evt  = is_run;
            blk8_evt = !is_run;
            nstate   = (dec_h1 == SRC_LIT) ? S_H1_LIT : S_H1_CONST;
          end
        end
      end
      S_H1_CONST, S_H2_CONST: begin
        wr_ok = !buf_full;
      end
      S_H1_LIT, S_H2_LIT: begin
        ate_ready = !buf_full;
        take      = ate_valid && !buf_full;
        wr_ok     = take;
      end
      default: nstate = S_IDLE;
    endcase

    if (wr_ok) begin
      buf_wr  = 1'b1;
      cnt_dec = 1'b1;
      if (cnt_last)
        nstate = S_DETECT;
      else if (!sel_h2 && !is_run && cnt_half_last)
        nstate = (h2_src == SRC_LIT) ? S_H2_LIT : S_H2_CONST;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      is_run <= 1'b0;
      h1_src <= SRC_ZERO;
      h2_src <= SRC_ZERO;
    end else begin
      state <= nstate;
      if (state == S_DETECT && take) is_run <= ate_bit;
      if (cnt_load) begin
        h1_src <= dec_h1;
        h2_src <= dec_h2;
      end
    end
  end

  // The tester is never asked for a bit while constant bits are produced.
  a_const_no_ate: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_H1_CONST || state == S_H2_CONST) |-> !ate_ready);
  // A run never has a second half.
  a_run_one_half: assert property (@(posedge clk) disable iff (!rst_n)
    is_run && state == S_H1_CONST && wr_ok && !cnt_last |=> state == S_H1_CONST);

endmodule
