// m10c_bit_mux -- selector of a decoded bit.
//
// Gives the bit to write into the output buffer for a half-block whose source
// is `src`: constant 0, constant 1, or the tester's incoming bit `lit`.
// `need_lit` tells the controller that this half takes bits from the tester.
// Purely combinational. The published decoder feeds its multiplexers with the
// tester's input bit and controller lines; the three-way source encoding is
// this design's choice.
module m10c_bit_mux
  import m10c_pkg::*;
(
  input  src_t src,
  input  logic lit,
  output logic bit_out,
  output logic need_lit
);

  always_comb begin
    unique case (src)
      SRC_ZERO: bit_out = 1'b0;
      SRC_ONE:  bit_out = 1'b1;
      SRC_LIT:  bit_out = lit;
      default:  bit_out = 1'b0;
    endcase
    need_lit = (src == SRC_LIT);
  end

endmodule
