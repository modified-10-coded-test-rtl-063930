// tb_m10c_decoder -- end-to-end test of the modified-10C decoder.
//
// Test data are compressed by the reference encoder (m10c_ref_pkg) and fed to
// the decoder through its tester handshake; every bit the decoder hands to
// the scan chain is compared with the original data. Scenarios:
//   1. the 56-bit reordered example set of seven 8-bit vectors, free-flowing
//      tester and scan side, with an exact clock-count check;
//   2. a directed stream that holds every block class and every run length;
//   3. random run-rich streams with random tester gaps and scan-side stalls
//      (the latter fill the output buffer and stall the decoder);
//   4. enable dropped between streams, and the statistics counters cleared.
// Each mechanism (run codewords of 0s and 1s, each block class, tester held
// during constant bits, buffer-full stall, tester gaps, idle) is counted and
// must occur at least once. The codeword counters must match the encoder's.
module tb_m10c_decoder;
  import m10c_ref_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        enable = 1'b0;
  logic        ate_bit = 1'b0, ate_valid = 1'b0, ate_ready;
  logic        scan_out, scan_valid, scan_ready = 1'b0;
  logic        stats_clr = 1'b0;
  logic [31:0] n_blk8, n_run;
  logic [8:0][31:0] n_cls;
  logic [7:0][31:0] n_len;
  logic        busy;

  int checks = 0, failures = 0;
  // mechanism counters
  int m_cls[9];
  int m_len[8];
  int m_run0 = 0, m_run1 = 0, m_hold = 0, m_full = 0, m_gap = 0, m_idle = 0, m_clr = 0;

  m10c_decoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
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

  // Push one stream through the decoder. p_gap / p_stall: percent of clocks
  // with the tester idle / the scan side not taking a bit.
  task automatic run_stream(input bitq_t data, input int p_gap, input int p_stall,
                            input bit check_cycles, input string name);
    bitq_t code, exp_out;
    enc_stats_t st;
    cwq_t cws;
    int ci = 0, ei = 0, cyc = 0, first = -1, last = -1;
    logic [31:0] b8_0, r_0;
    logic [8:0][31:0] c0;
    logic [7:0][31:0] l0;
    encode(data, code, exp_out, st, cws);
    b8_0 = n_blk8;
    r_0  = n_run;
    c0   = n_cls;
    l0   = n_len;
    while (ei < exp_out.size() && cyc < 200000 + 4 * exp_out.size()) begin
      bit fire, rd;
      @(negedge clk);
      ate_valid  = (ci < code.size()) && ($urandom_range(99) >= p_gap);
      ate_bit    = (ci < code.size()) ? code[ci] : 1'b0;
      scan_ready = ($urandom_range(99) >= p_stall);
      #1;
      fire = ate_valid && ate_ready;
      rd   = scan_valid && scan_ready;
      if (ci < code.size() && !ate_valid && dut.u_fsm.state != 0) m_gap++;
      if (ate_valid && !ate_ready && (dut.u_fsm.state == 4 || dut.u_fsm.state == 6)) m_hold++;
      if (dut.buf_full) m_full++;
      if (rd) begin
        check(scan_out == exp_out[ei], $sformatf("%s: bit %0d got %0b exp %0b", name, ei, scan_out, exp_out[ei]));
        ei++;
        last = cyc;
      end
      if (fire) begin
        if (first < 0) first = cyc;
        ci++;
      end
      cyc++;
    end
    @(negedge clk);
    ate_valid = 1'b0;
    check(ei == exp_out.size(), $sformatf("%s: only %0d of %0d bits out", name, ei, exp_out.size()));
    check(ci == code.size(), $sformatf("%s: %0d of %0d code bits taken", name, ci, code.size()));
    check(n_blk8 - b8_0 == st.n_blk8, $sformatf("%s: n_blk8 %0d exp %0d", name, n_blk8 - b8_0, st.n_blk8));
    check(n_run - r_0 == st.n_run0 + st.n_run1, $sformatf("%s: n_run %0d exp %0d", name, n_run - r_0, st.n_run0 + st.n_run1));
    for (int i = 0; i < 9; i++)
      check(n_cls[i] - c0[i] == st.n_cls[i], $sformatf("%s: class %0d count %0d exp %0d", name, i, n_cls[i] - c0[i], st.n_cls[i]));
    for (int i = 0; i < 8; i++)
      check(n_len[i] - l0[i] == st.n_len[i], $sformatf("%s: run length %0d count %0d exp %0d", name, i + 9, n_len[i] - l0[i], st.n_len[i]));
    if (check_cycles)
      check(last - first == int'(st.cycles),
            $sformatf("%s: %0d clocks, expected %0d", name, last - first, st.cycles));
    for (int i = 0; i < 9; i++) m_cls[i] += st.n_cls[i];
    for (int i = 0; i < 8; i++) m_len[i] += st.n_len[i];
    m_run0 += st.n_run0;
    m_run1 += st.n_run1;
    $display("%s: %0d data bits -> %0d code bits, %0d blocks, %0d runs, %0d clocks",
             name, data.size(), code.size(), st.n_blk8, st.n_run0 + st.n_run1, cyc);
  endtask

  function automatic bitq_t from_string(string s);
    bitq_t q;
    for (int i = 0; i < s.len(); i++) q.push_back(s[i] == "1");
    return q;
  endfunction

  function automatic bitq_t random_runs(int n);
    bitq_t q;
    while (q.size() < n) begin
      int kind = $urandom_range(3);
      if (kind == 0) begin
        bit v = 1'($urandom_range(1));
        int r = $urandom_range(30, 1);
        repeat (r) q.push_back(v);
      end else begin
        repeat ($urandom_range(8, 1)) q.push_back(1'($urandom_range(1)));
      end
    end
    return q;
  endfunction

  initial begin
    bitq_t d;
    foreach (m_cls[i]) m_cls[i] = 0;
    foreach (m_len[i]) m_len[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    enable = 1'b1;

    // 1. example set (seven reordered 8-bit vectors), no stalls
    d = from_string({"00001011", "11111011", "11111001", "11101101",
                     "00001111", "00001100", "11110000"});
    run_stream(d, 0, 0, 1'b1, "example");

    // 2. every block class and every run length
    d = from_string({"00000000", "11110000", "11111111", "00001111",
                     "11110110", "10011111", "00000101", "10100000",
                     "10110010"});
    for (int r = 9; r <= 16; r++) begin
      for (int i = 0; i < r; i++) d.push_back(1'b0);
      d = {d, from_string("10110101")};
      for (int i = 0; i < r; i++) d.push_back(1'b1);
      d = {d, from_string("01001010")};
    end
    run_stream(d, 0, 0, 1'b1, "directed");

    // 3. random streams with stalls
    for (int t = 0; t < 6; t++) begin
      d = random_runs(500 + $urandom_range(1500));
      run_stream(d, (t * 15) % 60, (t * 17) % 80, 1'b0, $sformatf("random%0d", t));
    end

    // 4. disable, check idle, clear statistics, run again
    @(negedge clk);
    enable = 1'b0;
    repeat (3) @(negedge clk);
    check(dut.u_fsm.state == 0 && !busy, "decoder idle when disabled");
    if (dut.u_fsm.state == 0) m_idle++;
    stats_clr = 1'b1;
    @(negedge clk);
    stats_clr = 1'b0;
    check(n_blk8 == 0 && n_run == 0 && n_cls == '0 && n_len == '0, "statistics cleared");
    if (n_blk8 == 0 && n_run == 0) m_clr++;
    enable = 1'b1;
    d = random_runs(400);
    run_stream(d, 30, 30, 1'b0, "after_idle");

    for (int i = 0; i < 9; i++) begin
      check(m_cls[i] > 0, $sformatf("block class %0d never seen", i));
    end
    for (int i = 0; i < 8; i++) check(m_len[i] > 0, $sformatf("run length %0d never seen", i + 9));
    check(m_run0 > 0, "no run of 0s");
    check(m_run1 > 0, "no run of 1s");
    check(m_hold > 0, "tester never held during constant bits");
    check(m_full > 0, "output buffer never full");
    check(m_gap > 0, "tester never idle");
    check(m_idle > 0, "idle state never entered");
    check(m_clr > 0, "statistics never cleared");
    $display("mechanisms: classes %p runs0=%0d runs1=%0d hold=%0d full=%0d gap=%0d idle=%0d clr=%0d",
             m_cls, m_run0, m_run1, m_hold, m_full, m_gap, m_idle, m_clr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
