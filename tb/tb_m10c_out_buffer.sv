// tb_m10c_out_buffer -- self-checking test of the b-bit output buffer.
// Random writes and scan-side reads are compared with a queue model; the full
// and valid flags, the 0 driven when empty and a fill to exactly B entries
// are checked.
module tb_m10c_out_buffer;
  localparam int B = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic wr = 1'b0, wr_bit = 1'b0, full;
  logic scan_ready = 1'b0, scan_valid, scan_out;
  int checks = 0, failures = 0;
  bit model[$];
  int n_full = 0;

  m10c_out_buffer #(.B(B)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cyc(input int pw, input int pr);
    bit w, r;
    @(negedge clk);
    #1;
    checks++;
    if (full != (model.size() == B) || scan_valid != (model.size() != 0) ||
        scan_out != ((model.size() != 0) ? model[0] : 1'b0)) begin
      failures++;
      $display("FAIL level=%0d full=%0b valid=%0b out=%0b", model.size(), full, scan_valid, scan_out);
    end
    if (full) n_full++;
    w = ($urandom_range(99) < pw) && !full;
    r = ($urandom_range(99) < pr);
    wr = w;
    wr_bit = 1'($urandom_range(1));
    scan_ready = r;
    @(posedge clk);
    if (r && model.size() != 0) void'(model.pop_front());
    if (w) model.push_back(wr_bit);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (30) cyc(100, 0);     // fill to full
    repeat (30) cyc(0, 100);     // drain to empty
    for (int i = 0; i < 4000; i++) cyc(60, 50);
    for (int i = 0; i < 2000; i++) cyc(80, 30);
    for (int i = 0; i < 2000; i++) cyc(30, 80);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + (n_full == 0));
    $finish;
  end
endmodule
