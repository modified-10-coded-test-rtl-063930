// m10c_code_dec -- the decoder's n-bit codeword decoder (combinational).
//
// Looks at the bits received after a detect bit (right-aligned in `bits`, the
// newest at bit 0, `nbits` of them valid) and says whether they form a complete
// codeword. When `done` is high it gives the block size and the source of each
// half-block (constant 0, constant 1 or literal tester bits):
//   run (detect = 1), 4 bits r : size 9 + r[2:0], both halves constant r[3]
//   block (detect = 0)         : size 8, halves per the prefix table in m10c_pkg
// `blk_cls` names the block class (valid with `done` for a block codeword).
// A run occupies the whole block, so h2_src equals h1_src for it. `err` flags a
// 4-bit block prefix that no codeword has (it cannot occur: 0110/0111 are the
// only 4-bit block prefixes and both are valid; kept as a checker output).
// The code table follows the published one except the four uniform-block
// codewords, re-assigned so that the code is prefix-free (see m10c_pkg).
module m10c_code_dec
  import m10c_pkg::*;
(
  input  logic                    is_run,
  input  logic [CODE_N-1:0]       bits,
  input  logic [2:0]              nbits,
  output logic                    done,
  output logic                    err,
  output size_t                   blk_size,
  output src_t                    h1_src,
  output src_t                    h2_src,
  output blk_cls_t                blk_cls
);

  always_comb begin
    done     = 1'b0;
    err      = 1'b0;
    blk_size = size_t'(K);
    h1_src   = SRC_ZERO;
    h2_src   = SRC_ZERO;
    blk_cls  = CLS_00;
    if (is_run) begin
      if (nbits == 3'(RUN_BITS)) begin
        done     = 1'b1;
        blk_size = size_t'(RUN_MIN) + size_t'(bits[2:0]);
        h1_src   = bits[3] ? SRC_ONE : SRC_ZERO;
        h2_src   = h1_src;
      end
    end else begin
      if (nbits == 3'd3) begin
        done = 1'b1;
        unique case (bits[2:0])
          3'b000: begin h1_src = SRC_ZERO; h2_src = SRC_ZERO; blk_cls = CLS_00; end
          3'b001: begin h1_src = SRC_ONE;  h2_src = SRC_ONE;  blk_cls = CLS_11; end
          3'b010: begin h1_src = SRC_LIT;  h2_src = SRC_LIT;  blk_cls = CLS_UU; end
          3'b011: done = 1'b0;                         // 01 / 10 need one more bit
          3'b100: begin h1_src = SRC_ONE;  h2_src = SRC_LIT;  blk_cls = CLS_1U; end
          3'b101: begin h1_src = SRC_LIT;  h2_src = SRC_ONE;  blk_cls = CLS_U1; end
          3'b110: begin h1_src = SRC_ZERO; h2_src = SRC_LIT;  blk_cls = CLS_0U; end
          3'b111: begin h1_src = SRC_LIT;  h2_src = SRC_ZERO; blk_cls = CLS_U0; end
        endcase
      end else if (nbits == 3'd4) begin
        unique case (bits[3:0])
          4'b0110: begin done = 1'b1; h1_src = SRC_ZERO; h2_src = SRC_ONE;  blk_cls = CLS_01; end
          4'b0111: begin done = 1'b1; h1_src = SRC_ONE;  h2_src = SRC_ZERO; blk_cls = CLS_10; end
          default: err = 1'b1;
        endcase
      end
    end
  end

endmodule
