// m10c_out_buffer -- b-bit buffer between the decoder and the scan chain.
//
// A first-in first-out store of B single bits. The decoder writes one decoded
// bit per clock (`wr`, refused while `full`); the scan side takes one bit per
// clock in which `scan_ready` (the scan clock enable, T_clk) is high and
// `scan_valid` shows a bit is present. When the buffer is empty `scan_out` is
// driven to 0, a defined value for the scan input. The buffer and its T_clk
// input follow the published block diagram; its depth (B = 16, one longest
// run) and the FIFO organisation are this design's choice. A bit written into
// an empty buffer is visible at `scan_out` on the next clock.
module m10c_out_buffer #(
  parameter int unsigned B = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic wr,
  input  logic wr_bit,
  output logic full,
  input  logic scan_ready,
  output logic scan_valid,
  output logic scan_out
);

  localparam int unsigned AW = (B > 1) ? $clog2(B) : 1;

  logic [B-1:0]  mem;
  logic [AW-1:0] wptr, rptr;
  logic [AW:0]   level;
  logic          do_wr, do_rd;

  assign full       = (level == (AW+1)'(B));
  assign scan_valid = (level != '0);
  assign scan_out   = scan_valid ? mem[rptr] : 1'b0;
  assign do_wr      = wr && !full;
  assign do_rd      = scan_ready && scan_valid;

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(B - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      level <= '0;
      mem   <= '0;
    end else begin
      if (do_wr) begin
        mem[wptr] <= wr_bit;
        wptr      <= inc(wptr);
      end
      if (do_rd) rptr <= inc(rptr);
      unique case ({do_wr, do_rd})
        2'b10:   level <= level + 1'b1;
        2'b01:   level <= level - 1'b1;
        default: level <= level;
      endcase
    end
  end

  // A write is only issued when there is room.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) wr |-> !full);

endmodule
