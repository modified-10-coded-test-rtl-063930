// tb_m10c_code_dec -- exhaustive test of the codeword decoder.
// Every detect-bit value, bit count and register pattern is applied; the
// expected result comes from a table of codeword strings written here.
module tb_m10c_code_dec;
  import m10c_pkg::*;
  logic       is_run;
  logic [3:0] bits;
  logic [2:0] nbits;
  logic       done, err;
  size_t      blk_size;
  src_t       h1_src, h2_src;
  blk_cls_t   blk_cls;
  int checks = 0, failures = 0;

  m10c_code_dec dut (.*);

  // Block codewords after the detect bit, and the half sources (0, 1, U).
  string pfx[9] = '{"000", "001", "0110", "0111", "100", "101", "110", "111", "010"};
  string hs [9] = '{"00",  "11",  "01",   "10",   "1U",  "U1",  "0U",  "U0",  "UU"};

  function automatic src_t to_src(byte c);
    return (c == "0") ? SRC_ZERO : (c == "1") ? SRC_ONE : SRC_LIT;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 2; r++)
      for (int n = 0; n <= 4; n++)
        for (int b = 0; b < 16; b++) begin
          automatic bit    e_done = 0;
          automatic int    e_size = 8;
          automatic src_t  e1 = SRC_ZERO, e2 = SRC_ZERO;
          automatic int    e_cls = -1;
          is_run = r[0];
          nbits  = 3'(n);
          bits   = 4'(b);
          if (r == 1) begin
            if (n == 4) begin
              e_done = 1;
              e_size = 9 + (b & 7);
              e1 = (b >= 8) ? SRC_ONE : SRC_ZERO;
              e2 = e1;
            end
          end else begin
            for (int k = 0; k < 9; k++) begin
              automatic string ps = pfx[k];
              automatic string hk = hs[k];
              if (ps.len() == n) begin
                automatic int v = 0;
                for (int i = 0; i < n; i++) v = (v << 1) | int'(ps.getc(i) == 8'h31);
                if (v == (b & ((1 << n) - 1))) begin
                  e_done = 1;
                  e_cls = k;
                  e1 = to_src(hk.getc(0));
                  e2 = to_src(hk.getc(1));
                end
              end
            end
          end
          #1;
          checks++;
          if (done != e_done || (e_done && (blk_size != size_t'(e_size) ||
              h1_src != e1 || h2_src != e2))) begin
            failures++;
            $display("FAIL run=%0d n=%0d bits=%b: done=%0b size=%0d h=%s/%s, exp done=%0b size=%0d h=%s/%s",
                     r, n, bits, done, blk_size, h1_src.name(), h2_src.name(),
                     e_done, e_size, e1.name(), e2.name());
          end
          if (r == 0 && e_done) begin
            checks++;
            if (int'(blk_cls) != e_cls) begin
              failures++;
              $display("FAIL class n=%0d bits=%b: %0d exp %0d", n, bits, blk_cls, e_cls);
            end
          end
          // err only for a 4-bit block prefix that is no codeword
          checks++;
          if (err != (r == 0 && n == 4 && !e_done)) begin
            failures++;
            $display("FAIL err run=%0d n=%0d bits=%b", r, n, bits);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
