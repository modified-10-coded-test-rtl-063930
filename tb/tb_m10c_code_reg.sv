// tb_m10c_code_reg -- self-checking test of the codeword register.
// Random clear/shift/hold sequences are compared with a queue-based model of
// the register contents and bit count, including the look-ahead outputs.
module tb_m10c_code_reg;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic       clr = 1'b0, shift = 1'b0, din = 1'b0;
  logic [3:0] q, peek;
  logic [2:0] cnt, peek_cnt;
  int checks = 0, failures = 0;
  int model_q = 0, model_cnt = 0;

  m10c_code_reg #(.N(4)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      clr   = ($urandom_range(9) == 0);
      shift = 1'($urandom_range(1));
      din   = 1'($urandom_range(1));
      #1;
      checks++;
      if (peek != 4'(((model_q << 1) | int'(din)) & 15) ||
          peek_cnt != 3'((model_cnt == 4) ? 4 : model_cnt + 1)) begin
        failures++;
        $display("FAIL peek %b/%0d model %b/%0d", peek, peek_cnt, model_q, model_cnt);
      end
      @(posedge clk);
      if (clr) begin model_q = 0; model_cnt = 0; end
      else if (shift) begin
        model_q = ((model_q << 1) | int'(din)) & 15;
        if (model_cnt < 4) model_cnt++;
      end
      #1;
      checks++;
      if (q != 4'(model_q) || cnt != 3'(model_cnt)) begin
        failures++;
        $display("FAIL q %b/%0d model %b/%0d", q, cnt, model_q, model_cnt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
