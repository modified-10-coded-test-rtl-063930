// tb_m10c_bit_mux -- exhaustive test of the decoded-bit selector.
module tb_m10c_bit_mux;
  import m10c_pkg::*;
  src_t src;
  logic lit, bit_out, need_lit;
  int checks = 0, failures = 0;

  m10c_bit_mux dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic src_t all[3] = '{SRC_ZERO, SRC_ONE, SRC_LIT};
    foreach (all[i])
      for (int l = 0; l < 2; l++) begin
        logic e;
        src = all[i];
        lit = l[0];
        e = (i == 0) ? 1'b0 : (i == 1) ? 1'b1 : l[0];
        #1;
        checks++;
        if (bit_out != e || need_lit != (i == 2)) begin
          failures++;
          $display("FAIL src=%s lit=%0b out=%0b need=%0b", src.name(), lit, bit_out, need_lit);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
