// m10c_code_stats -- occurrence counters of decoded codewords.
//
// Counts decoded codewords: in total for pattern length 8 (detect bit 0,
// `n_blk8`) and for pattern length greater than 8 (detect bit 1, runs of
// 9..16, `n_run`), and, finer, per block class (`n_cls`, indexed by
// m10c_pkg::blk_cls_t: 00, 11, 01, 10, 1U, U1, 0U, U0, UU) and per run length
// (`n_len`, index = length - 9). Each pulse on `blk8_evt` / `run_evt` counts
// one codeword, whose class or size is given on `blk_cls` / `run_size` in the
// same clock. `clr` zeroes every counter. Counters are W bits wide and
// saturate instead of wrapping; counts are visible the clock after the event.
// The separate counters for length-8 patterns and for longer patterns, and
// counting per codeword and per run length, follow the published decoder
// description; width and saturation are this design's choice.
module m10c_code_stats
  import m10c_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clr,
  input  logic                    blk8_evt,
  input  blk_cls_t                blk_cls,
  input  logic                    run_evt,
  input  size_t                   run_size,
  output logic [W-1:0]            n_blk8,
  output logic [W-1:0]            n_run,
  output logic [N_CLS-1:0][W-1:0] n_cls,
  output logic [N_LEN-1:0][W-1:0] n_len
);

  size_t len_idx;
  assign len_idx = run_size - size_t'(RUN_MIN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_blk8 <= '0;
      n_run  <= '0;
      n_cls  <= '0;
      n_len  <= '0;
    end else if (clr) begin
      n_blk8 <= '0;
      n_run  <= '0;
      n_cls  <= '0;
      n_len  <= '0;
    end else begin
      if (blk8_evt && n_blk8 != '1) n_blk8 <= n_blk8 + 1'b1;
      if (run_evt  && n_run  != '1) n_run  <= n_run  + 1'b1;
      for (int i = 0; i < int'(N_CLS); i++)
        if (blk8_evt && blk_cls == blk_cls_t'(i) && n_cls[i] != '1)
          n_cls[i] <= n_cls[i] + 1'b1;
      for (int i = 0; i < int'(N_LEN); i++)
        if (run_evt && len_idx == size_t'(i) && n_len[i] != '1)
          n_len[i] <= n_len[i] + 1'b1;
    end
  end

endmodule
