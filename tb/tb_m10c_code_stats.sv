// tb_m10c_code_stats -- self-checking test of the codeword occurrence counters.
// Random events with random classes and run sizes, and random clears, are
// compared with a model of all counters; a narrow (4-bit) width makes the
// counters saturate.
module tb_m10c_code_stats;
  import m10c_pkg::*;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic       clr = 1'b0, blk8_evt = 1'b0, run_evt = 1'b0;
  blk_cls_t   blk_cls = CLS_00;
  size_t      run_size = size_t'(9);
  logic [3:0] n_blk8, n_run;
  logic [8:0][3:0] n_cls;
  logic [7:0][3:0] n_len;
  int checks = 0, failures = 0;
  int mb = 0, mr = 0;
  int mc[9], ml[8];
  int n_sat = 0;

  m10c_code_stats #(.W(4)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (mc[i]) mc[i] = 0;
    foreach (ml[i]) ml[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      clr      = ($urandom_range(99) < 1);
      blk8_evt = 1'($urandom_range(1));
      run_evt  = ($urandom_range(2) == 0);
      blk_cls  = blk_cls_t'($urandom_range(8));
      run_size = size_t'($urandom_range(16, 9));
      @(posedge clk);
      if (clr) begin
        mb = 0; mr = 0;
        foreach (mc[k]) mc[k] = 0;
        foreach (ml[k]) ml[k] = 0;
      end else begin
        if (blk8_evt && mb < 15) mb++;
        if (run_evt && mr < 15) mr++;
        if (blk8_evt && mc[int'(blk_cls)] < 15) mc[int'(blk_cls)]++;
        if (run_evt && ml[int'(run_size) - 9] < 15) ml[int'(run_size) - 9]++;
      end
      #1;
      checks++;
      if (n_blk8 != 4'(mb) || n_run != 4'(mr)) begin
        failures++;
        $display("FAIL totals %0d/%0d model %0d/%0d", n_blk8, n_run, mb, mr);
      end
      for (int k = 0; k < 9; k++) begin
        checks++;
        if (n_cls[k] != 4'(mc[k])) begin
          failures++;
          $display("FAIL class %0d: %0d model %0d", k, n_cls[k], mc[k]);
        end
      end
      for (int k = 0; k < 8; k++) begin
        checks++;
        if (n_len[k] != 4'(ml[k])) begin
          failures++;
          $display("FAIL length %0d: %0d model %0d", k + 9, n_len[k], ml[k]);
        end
      end
      if (mb == 15) n_sat++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + (n_sat == 0));
    $finish;
  end
endmodule
