// m10c_counter_dc -- decoded-bit counter of the current block (Counter_DC).
//
// Loaded with the block size (Block_size: 8 for a block, 9..16 for a run) when
// a codeword has been decoded, it counts down by one for every decoded bit
// written towards the scan chain (`dec`, the controller's doc_dc). `last`
// (reg_dc) is high while the next bit written is the block's final one, and
// `half_last` while it is the final bit of the first 4-bit half. `load` wins
// over `dec`. The counter's name and its Block_size/doc_dc/reg_dc links follow
// the published decoder block diagram; counting down and the half flag are
// this design's choice.
module m10c_counter_dc
  import m10c_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  load,
  input  size_t load_val,
  input  logic  dec,
  output size_t count,
  output logic  last,
  output logic  half_last
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                     count <= '0;
    else if (load)                  count <= load_val;
    else if (dec && count != '0)    count <= count - 1'b1;
  end

  assign last      = (count == size_t'(1));
  assign half_last = (count == size_t'(HALF + 1));

endmodule
