// m10c_code_reg -- the decoder's n-bit codeword register.
//
// Collects, MSB first, the bits of a codeword after its detect bit: the 4-bit
// run field or the 3- or 4-bit block prefix. Each `shift` moves `din` in at the
// LSB and counts it; `clr` (the controller's rst_data) empties the register.
// `peek`/`peek_cnt` show the contents as they will be after shifting in `din`,
// so the codeword decoder can decide in the same cycle the last bit arrives.
// The register and its name follow the published decoder block diagram; its
// width (N = 4, the longest field) and the look-ahead outputs are this
// design's choice. Timing: one clock per shifted bit, clr wins over shift.
module m10c_code_reg #(
  parameter int unsigned N = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clr,
  input  logic                       shift,
  input  logic                       din,
  output logic [N-1:0]               q,
  output logic [$clog2(N+1)-1:0]     cnt,
  output logic [N-1:0]               peek,
  output logic [$clog2(N+1)-1:0]     peek_cnt
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q   <= '0;
      cnt <= '0;
    end else if (clr) begin
      q   <= '0;
      cnt <= '0;
    end else if (shift) begin
      q   <= peek;
      cnt <= peek_cnt;
    end
  end

  always_comb begin
    peek     = {q[N-2:0], din};
    peek_cnt = (cnt == N[$clog2(N+1)-1:0]) ? cnt : cnt + 1'b1;
  end

endmodule
