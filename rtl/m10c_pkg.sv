// m10c_pkg -- constants and types shared by the modified-10C test data decoder.
//
// The modified 10C code splits the scan-in stream into codewords. Each codeword
// starts with a detect bit:
//   detect = 1 : a run of 9..16 equal bits follows as a 4-bit field r[3:0]
//                (MSB first): r[3] is the run value, r[2:0] is run length - 9.
//   detect = 0 : an 8-bit block follows. The block is seen as two 4-bit halves,
//                each all-0 ("0"), all-1 ("1") or mixed ("U"), and the block
//                prefix (MSB first) selects the pair:
//                  000 -> 00     001 -> 11     0110 -> 01     0111 -> 10
//                  100 -> 1U     101 -> U1     110  -> 0U     111  -> U0
//                  010 -> UU
//                followed by the literal bits of every mixed half, in scan order.
// The run field, the 8-bit block size, the 9..16 run sizes and the five
// mixed-half prefixes (100, 101, 110, 111, 010) follow the published code table.
// The codewords of the four uniform blocks (00, 11, 01, 10) are this design's
// own: as published they are prefixes of the mixed-half codewords, so a serial
// decoder could not tell them apart; here they take the free code space.
package m10c_pkg;

  // Block (pattern) length used when the detect bit is 0.
  localparam int unsigned K        = 8;
  localparam int unsigned HALF     = K / 2;
  // Run lengths coded when the detect bit is 1.
  localparam int unsigned RUN_MIN  = 9;
  localparam int unsigned RUN_MAX  = 16;
  // Width of the run-length field and of the codeword register.
  localparam int unsigned RUN_BITS = 4;
  localparam int unsigned CODE_N   = 4;
  // Width able to hold any block size (up to RUN_MAX).
  localparam int unsigned SIZE_W   = $clog2(RUN_MAX + 1);

  // Where the bits of one half-block (or of a whole run) come from.
  typedef enum logic [1:0] {
    SRC_ZERO = 2'd0,   // constant 0, no tester bit consumed
    SRC_ONE  = 2'd1,   // constant 1, no tester bit consumed
    SRC_LIT  = 2'd2    // the tester's bit, passed through
  } src_t;

  // Decoder controller states (eight, as in the proposed scheme).
  typedef enum logic [2:0] {
    S_IDLE     = 3'd0,  // decoder disabled
    S_DETECT   = 3'd1,  // waiting for the detect bit
    S_RUNCODE  = 3'd2,  // receiving the 4-bit run field
    S_PREFIX   = 3'd3,  // receiving the block prefix
    S_H1_CONST = 3'd4,  // first half (or whole run) of constant bits
    S_H1_LIT   = 3'd5,  // first half of literal bits
    S_H2_CONST = 3'd6,  // second half of constant bits
    S_H2_LIT   = 3'd7   // second half of literal bits
  } state_t;

  typedef logic [SIZE_W-1:0] size_t;

  // Classes of the 8-bit block codewords (detect bit 0), in code-table order.
  typedef enum logic [3:0] {
    CLS_00 = 4'd0, CLS_11 = 4'd1, CLS_01 = 4'd2, CLS_10 = 4'd3,
    CLS_1U = 4'd4, CLS_U1 = 4'd5, CLS_0U = 4'd6, CLS_U0 = 4'd7,
    CLS_UU = 4'd8
  } blk_cls_t;
  localparam int unsigned N_CLS = 9;
  // Number of distinct run lengths (9..16).
  localparam int unsigned N_LEN = RUN_MAX - RUN_MIN + 1;

endpackage
