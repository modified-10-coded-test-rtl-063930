// tb_m10c_counter_dc -- self-checking test of Counter_DC.
// Loads every block size (8..16), decrements with random gaps and checks the
// count and the last / half_last flags against a model; also load-over-dec
// priority and that the counter holds at zero.
module tb_m10c_counter_dc;
  import m10c_pkg::*;
  logic  clk = 1'b0, rst_n = 1'b0;
  logic  load = 1'b0, dec = 1'b0;
  size_t load_val = '0;
  size_t count;
  logic  last, half_last;
  int checks = 0, failures = 0;
  int model = 0;
  int n_last = 0;

  m10c_counter_dc dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input bit l, input int v, input bit d);
    @(negedge clk);
    load = l; load_val = size_t'(v); dec = d;
    @(posedge clk);
    if (l) model = v;
    else if (d && model != 0) model--;
    #1;
    checks++;
    if (count != size_t'(model) || last != (model == 1) || half_last != (model == 5)) begin
      failures++;
      $display("FAIL count=%0d last=%0b half=%0b model=%0d", count, last, half_last, model);
    end
    if (last) n_last++;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int rep = 0; rep < 20; rep++)
      for (int s = 8; s <= 16; s++) begin
        step(1'b1, s, 1'($urandom_range(1)));
        while (model != 0) step(1'b0, 0, $urandom_range(3) != 0);
        step(1'b0, 0, 1'b1);   // stays at zero
      end
    step(1'b1, 12, 1'b1);      // load wins over dec
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + (n_last == 0));
    $finish;
  end
endmodule
