// tb_m10c_fsm -- self-checking test of the decoder controller on its own.
//
// The codeword register, codeword decoder, Counter_DC, bit selectors and
// output buffer around the controller are replaced by models in this
// testbench: the codeword decoder's answer comes from the reference encoder's
// list of codewords, the counter is a plain integer and the buffer a queue
// whose full flag is driven at random. Checked: the decoded bit stream
// written by the controller, the number of tester bits taken, rst_data at
// each detect bit, the occurrence events, that the tester is held while
// constant bits are written, and the clock count with no stalls.
module tb_m10c_fsm;
  import m10c_pkg::*;
  import m10c_ref_pkg::*;

  logic   clk = 1'b0, rst_n = 1'b0, enable = 1'b0;
  logic   ate_valid = 1'b0, ate_bit = 1'b0, ate_ready;
  logic   reg_clr, reg_shift, is_run;
  logic   dec_done;
  size_t  dec_size;
  src_t   dec_h1, dec_h2;
  logic   cnt_load, cnt_dec, cnt_last, cnt_half_last;
  size_t  cnt_load_val;
  src_t   h1_src, h2_src;
  logic   sel_h2, buf_wr, buf_full = 1'b0;
  logic   blk8_evt, run_evt;
  state_t state;

  int checks = 0, failures = 0;
  int cnt_model = 0;        // model of Counter_DC
  int after_detect = 0;     // codeword bits taken after the detect bit
  int cw_idx = 0;           // codeword being decoded
  cwq_t cws;
  int n_hold = 0, n_full_stall = 0;

  m10c_fsm dut (.*);
  always #5 clk = ~clk;

  // Codeword decoder model: complete on the last non-literal bit. Driven by
  // the stimulus process at each falling edge.
  task automatic model_dec();
    dec_done = 1'b0;
    dec_size = size_t'(8);
    dec_h1   = SRC_ZERO;
    dec_h2   = SRC_ZERO;
    if (cw_idx < cws.size()) begin
      dec_done = (after_detect + 1 == cws[cw_idx].clen);
      dec_size = size_t'(cws[cw_idx].size);
      dec_h1   = src_t'(cws[cw_idx].h1);
      dec_h2   = src_t'(cws[cw_idx].h2);
    end
  endtask
  assign cnt_last      = (cnt_model == 1);
  assign cnt_half_last = (cnt_model == 5);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  task automatic run(input bitq_t data, input int p_full, input int p_gap, input bit chk_cyc);
    bitq_t code, exp_out, got;
    enc_stats_t st;
    int ci = 0, cyc = 0, first = -1, last = -1, n_clr = 0, n_b8 = 0, n_run = 0;
    encode(data, code, exp_out, st, cws);
    cw_idx = 0;
    while (got.size() < exp_out.size() && cyc < 100000) begin
      bit fire, wbit, dd, ld, dc;
      state_t sn;
      int lv;
      src_t s;
      @(negedge clk);
      buf_full  = ($urandom_range(99) < p_full);
      ate_valid = (ci < code.size()) && ($urandom_range(99) >= p_gap);
      ate_bit   = (ci < code.size()) ? code[ci] : 1'b0;
      model_dec();
      #1;
      fire = ate_valid && ate_ready;
      if (state == S_H1_CONST || state == S_H2_CONST) begin
        check(!ate_ready, "tester not held during constant bits");
        if (ate_valid) n_hold++;
      end
      if (buf_full && (state inside {S_H1_CONST, S_H1_LIT, S_H2_CONST, S_H2_LIT})) begin
        check(!buf_wr, "write while buffer full");
        n_full_stall++;
      end
      if (buf_wr) begin
        s = sel_h2 ? h2_src : h1_src;
        wbit = (s == SRC_LIT) ? ate_bit : (s == SRC_ONE);
        if (s == SRC_LIT) check(fire, "literal written without a tester bit");
        got.push_back(wbit);
        last = cyc;
      end
      if (reg_clr) n_clr++;
      if (blk8_evt) n_b8++;
      if (run_evt) n_run++;
      sn = state; dd = dec_done; ld = cnt_load; dc = cnt_dec; lv = int'(cnt_load_val);
      @(posedge clk);
      #1;
      // models (updated after the edge so that the design's assertions see
      // the values of the cycle that just ended)
      if (ld) cnt_model = lv;
      else if (dc && cnt_model > 0) cnt_model--;
      if (fire) begin
        if (first < 0) first = cyc;
        ci++;
        if (sn == S_DETECT) after_detect = 0;
        else if (sn == S_RUNCODE || sn == S_PREFIX) begin
          if (dd) begin cw_idx++; after_detect = 0; end
          else after_detect++;
        end
      end
      cyc++;
    end
    check(got == exp_out, "decoded stream differs");
    check(ci == code.size(), "not all code bits taken");
    check(n_clr == cws.size(), "rst_data count");
    check(n_b8 == st.n_blk8 && n_run == st.n_run0 + st.n_run1, "occurrence events");
    if (chk_cyc) check(last - first + 1 == int'(st.cycles), $sformatf("clocks %0d exp %0d", last - first + 1, st.cycles));
  endtask

  function automatic bitq_t random_runs(int n);
    bitq_t q;
    while (q.size() < n) begin
      if ($urandom_range(2) == 0) begin
        bit v = 1'($urandom_range(1));
        repeat ($urandom_range(20, 1)) q.push_back(v);
      end else repeat ($urandom_range(8, 1)) q.push_back(1'($urandom_range(1)));
    end
    return q;
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    enable = 1'b1;
    @(negedge clk);
    check(state == S_DETECT, "leaves idle when enabled");
    run(random_runs(600), 0, 0, 1'b1);
    for (int t = 0; t < 5; t++) run(random_runs(800), 10 * t, 10 * t, 1'b0);
    check(n_hold > 0 && n_full_stall > 0, "hold and full stall exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
