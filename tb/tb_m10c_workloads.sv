// tb_m10c_workloads -- full-size runs of the decoder at its default parameters.
//
// For each of five benchmark-sized test sets (122532, 139283, 1165200, 176993
// and 183462 bits, the test-data volumes of the five ISCAS'89 circuits of the
// published compression table) a synthetic, run-rich stream of that length is
// generated, compressed by the reference encoder and decoded. The real test
// cubes are not reproduced: the data only have the sizes of the real sets.
// Tester and scan side run free, so the clock count must equal the encoder's
// prediction exactly; every decoded bit and both codeword counters are
// checked. The compression ratio reached on the synthetic data is printed.
module tb_m10c_workloads;
  import m10c_ref_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        enable = 1'b0;
  logic        ate_bit = 1'b0, ate_valid = 1'b0, ate_ready;
  logic        scan_out, scan_valid, scan_ready = 1'b1;
  logic        stats_clr = 1'b0;
  logic [31:0] n_blk8, n_run;
  logic [8:0][31:0] n_cls;
  logic [7:0][31:0] n_len;
  logic        busy;

  int checks = 0, failures = 0;

  m10c_decoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000000) @(posedge clk);
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

  // Run-rich synthetic data: long runs of 0s and 1s mixed with short random
  // stretches, as in don't-care-filled, reordered test cubes.
  function automatic bitq_t synth(int n);
    bitq_t q;
    while (q.size() < n) begin
      if ($urandom_range(99) < 45) begin
        bit v = ($urandom_range(99) < 70) ? 1'b0 : 1'b1;
        repeat ($urandom_range(40, 4)) q.push_back(v);
      end else
        repeat ($urandom_range(8, 1)) q.push_back(1'($urandom_range(1)));
    end
    while (q.size() > n) void'(q.pop_back());
    return q;
  endfunction

  task automatic run_set(input string name, input int n);
    bitq_t data, code, exp_out;
    enc_stats_t st;
    cwq_t cws;
    longint unsigned cyc = 0, first = 0, last = 0;
    int ci = 0, ei = 0, bad = 0;
    bit started = 0;
    data = synth(n);
    encode(data, code, exp_out, st, cws);
    stats_clr = 1'b1;
    @(negedge clk);
    stats_clr = 1'b0;
    while (ei < exp_out.size() && cyc < 4 * longint'(exp_out.size()) + 1000) begin
      bit fire, rd;
      @(negedge clk);
      ate_valid = (ci < code.size());
      ate_bit   = ate_valid ? code[ci] : 1'b0;
      #1;
      fire = ate_valid && ate_ready;
      rd   = scan_valid && scan_ready;
      if (rd) begin
        if (scan_out != exp_out[ei]) bad++;
        ei++;
        last = cyc;
      end
      if (fire) begin
        if (!started) begin first = cyc; started = 1; end
        ci++;
      end
      cyc++;
    end
    @(negedge clk);
    ate_valid = 1'b0;
    check(bad == 0, $sformatf("%s: %0d wrong bits", name, bad));
    check(ei == exp_out.size(), $sformatf("%s: %0d of %0d bits out", name, ei, exp_out.size()));
    check(ci == code.size(), $sformatf("%s: %0d of %0d code bits taken", name, ci, code.size()));
    check(n_blk8 == st.n_blk8 && n_run == st.n_run0 + st.n_run1, $sformatf("%s: counters", name));
    for (int i = 0; i < 9; i++)
      check(n_cls[i] == st.n_cls[i], $sformatf("%s: class %0d count", name, i));
    for (int i = 0; i < 8; i++)
      check(n_len[i] == st.n_len[i], $sformatf("%s: run length %0d count", name, i + 9));
    check(last - first == st.cycles, $sformatf("%s: %0d clocks, expected %0d", name, last - first, st.cycles));
    $display("%s: %0d bits -> %0d code bits (%0.2f%% compression), %0d blocks, %0d runs, %0d clocks",
             name, n, code.size(), 100.0 * (real'(n) - real'(code.size())) / real'(n),
             st.n_blk8, st.n_run0 + st.n_run1, last - first);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n  = 1'b1;
    enable = 1'b1;
    run_set("s5378",  122532);
    run_set("s9234",  139283);
    run_set("s13207", 1165200);
    run_set("s15850", 176993);
    run_set("s38417", 183462);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
