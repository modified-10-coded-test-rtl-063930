// m10c_ref_pkg -- reference model of the modified-10C encoder for testbenches.
//
// encode() compresses a bit stream the way the off-line compressor does:
// from the current position it measures the run of equal bits (at most 16);
// a run of 9..16 becomes a run codeword (detect 1, value, length - 9 on three
// bits), otherwise the next 8 bits (padded with 0 at the end of the data)
// become a block codeword (detect 0, prefix, literal bits of mixed halves).
// The prefix table is written out here on its own, independent of the RTL
// decoder. The function also returns what the decoder should produce (the data
// plus padding), the codeword statistics and the clock count the decoder needs
// when neither side ever stalls.
package m10c_ref_pkg;

  typedef bit bitq_t[$];

  // Block classes, in the order of the published table.
  typedef enum int {C_00, C_11, C_01, C_10, C_1U, C_U1, C_0U, C_U0, C_UU} cls_t;

  typedef struct {
    int unsigned n_blk8;
    int unsigned n_run0;
    int unsigned n_run1;
    int unsigned n_cls[9];
    int unsigned n_len[8];         // runs per length, index = length - 9
    longint unsigned cycles;       // free-flow clock count
    longint unsigned code_bits;
  } enc_stats_t;

  // One codeword: bits after the detect bit that are not literal data, the
  // decoded size and the source of each half (0, 1 or 2 = literal).
  typedef struct {
    bit is_run;
    int clen;
    int size;
    int h1;
    int h2;
  } cw_t;
  typedef cw_t cwq_t[$];

  // Prefix of each block class (MSB first) and the half classes.
  function automatic string prefix_of(cls_t c);
    case (c)
      C_00: return "000";
      C_11: return "001";
      C_01: return "0110";
      C_10: return "0111";
      C_1U: return "100";
      C_U1: return "101";
      C_0U: return "110";
      C_U0: return "111";
      default: return "010";
    endcase
  endfunction

  // 0 = all zeros, 1 = all ones, 2 = mixed
  function automatic int half_kind(bit b[8], int base);
    int ones = 0;
    for (int i = 0; i < 4; i++) ones += b[base+i];
    if (ones == 0) return 0;
    if (ones == 4) return 1;
    return 2;
  endfunction

  function automatic cls_t classify(bit b[8]);
    int h1 = half_kind(b, 0);
    int h2 = half_kind(b, 4);
    if (h1 == 0 && h2 == 0) return C_00;
    if (h1 == 1 && h2 == 1) return C_11;
    if (h1 == 0 && h2 == 1) return C_01;
    if (h1 == 1 && h2 == 0) return C_10;
    if (h1 == 1 && h2 == 2) return C_1U;
    if (h1 == 2 && h2 == 1) return C_U1;
    if (h1 == 0 && h2 == 2) return C_0U;
    if (h1 == 2 && h2 == 0) return C_U0;
    return C_UU;
  endfunction

  function automatic void encode(input bitq_t data, output bitq_t code,
                                 output bitq_t expect_out, output enc_stats_t st,
                                 output cwq_t cws);
    int p = 0;
    int n = data.size();
    code = {};
    expect_out = {};
    cws = {};
    st = '{default: 0};
    while (p < n) begin
      bit v = data[p];
      int r = 1;
      while (p + r < n && r < 16 && data[p+r] == v) r++;
      if (r >= 9) begin
        int l = r - 9;
        code.push_back(1'b1);
        code.push_back(v);
        for (int i = 2; i >= 0; i--) code.push_back(l[i]);
        for (int i = 0; i < r; i++) expect_out.push_back(v);
        if (v) st.n_run1++; else st.n_run0++;
        st.n_len[r-9]++;
        cws.push_back('{1'b1, 4, r, int'(v), int'(v)});
        st.cycles += 64'(r) + 64'd5;
        p += r;
      end else begin
        bit b[8];
        cls_t c;
        string pf;
        for (int i = 0; i < 8; i++) b[i] = (p + i < n) ? data[p+i] : 1'b0;
        c  = classify(b);
        pf = prefix_of(c);
        code.push_back(1'b0);
        for (int i = 0; i < pf.len(); i++) code.push_back(pf[i] == "1");
        if (c == C_UU) begin
          for (int i = 0; i < 8; i++) code.push_back(b[i]);
        end else if (c == C_U1 || c == C_U0) begin
          for (int i = 0; i < 4; i++) code.push_back(b[i]);
        end else if (c == C_1U || c == C_0U) begin
          for (int i = 4; i < 8; i++) code.push_back(b[i]);
        end
        for (int i = 0; i < 8; i++) expect_out.push_back(b[i]);
        cws.push_back('{1'b0, pf.len(), 8,
                         half_kind(b, 0), half_kind(b, 4)});
        st.n_blk8++;
        st.n_cls[c]++;
        st.cycles += 64'(pf.len()) + 64'd9;
        p += 8;
      end
    end
    st.code_bits = longint'(code.size());
  endfunction

endpackage
