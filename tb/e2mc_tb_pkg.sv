// e2mc_tb_pkg: software side and reference model used by the testbenches.
//
// build_code() makes a canonical Huffman code for a set of most frequent
// values (MFVs) plus the escape codeword, the way the code-generation software
// would, from a fixed length profile that satisfies the Kraft inequality:
//   entry 0 (escape) and entries 1..2 : 3 bits
//   entries 3..34                     : 7 bits
//   entries 35..n-11                  : 12 bits
//   last 10 entries                   : 20 bits (the longest allowed)
// Canonical codes: the first code is all zeros; each next code is the previous
// plus one, shifted left by the growth in length. FCW(l) is the first code of
// length l and offset(l) = FCW(l) - (index of that code), so that
// De-LUT index = CW - offset(CL).
// The MFV values are chosen so that no c-LUT set receives more than 8.
//
// build_code_huffman() instead builds a real length-limited Huffman code from
// sampled value counts, as code-generation software would.
// cfg_list() turns the code into the configuration writes, ref_compress() is
// a bit-serial reference of the compressed block format and gen_block() makes
// test blocks with a given share of MFV symbols.
package e2mc_tb_pkg;
  import e2mc_pkg::*;

  int unsigned n_code;                 // codes including the escape
  int unsigned clen [DLUT_DEPTH];
  logic [MAX_CL-1:0] code [DLUT_DEPTH];
  logic [SL-1:0] cval [DLUT_DEPTH];    // symbol of code r (r >= 1)
  int            idx_of [logic [SL-1:0]];
  int unsigned   esc_r;                // canonical index of the escape code

  function automatic int unsigned profile_len(int unsigned r, int unsigned n);
    if (r < 3) return 3;
    if (r < 35) return 7;
    if (n > 45 && r >= n - 10) return 20;
    return 12;
  endfunction

  // MFV number i (0..1023): low 7 bits = set, tag spread over the 512 tags.
  function automatic logic [SL-1:0] mfv_value(int unsigned i, int unsigned seed);
    logic [8:0] tag;
    tag = 9'((((i >> 7) & 7) * 37 + seed) % 512);
    return {tag, 7'(i & 127)};
  endfunction

  function automatic void build_code(int unsigned n_mfv, int unsigned seed);
    logic [MAX_CL-1:0] c;
    idx_of.delete();
    esc_r  = 0;
    n_code = n_mfv + 1;
    c = '0;
    for (int unsigned r = 0; r < n_code; r++) begin
      clen[r] = profile_len(r, n_code);
      if (r > 0) c = (c + 1'b1) << (clen[r] - clen[r-1]);
      code[r] = c;
      if (r > 0) begin
        // frequency order: lower MFV numbers get shorter codes
        cval[r] = mfv_value(r - 1, seed);
        idx_of[cval[r]] = int'(r);
      end else begin
        cval[r] = '0;
      end
    end
  endfunction

  // Same, for MFVs given in order of falling frequency (at most 8 per
  // c-LUT set, at most NUM_MFV values).
  function automatic void build_code_vals(logic [SL-1:0] vals[$]);
    logic [MAX_CL-1:0] c;
    idx_of.delete();
    esc_r  = 0;
    n_code = vals.size() + 1;
    c = '0;
    for (int unsigned r = 0; r < n_code; r++) begin
      clen[r] = profile_len(r, n_code);
      if (r > 0) c = (c + 1'b1) << (clen[r] - clen[r-1]);
      code[r] = c;
      if (r > 0) begin
        cval[r] = vals[r - 1];
        idx_of[cval[r]] = int'(r);
      end else begin
        cval[r] = '0;
      end
    end
  endfunction

  // Code lengths of a Huffman code for freq[] (two smallest nodes merged
  // repeatedly; O(n^2), enough for about 1K symbols).
  function automatic void huffman_lengths(longint unsigned freq[$], ref int unsigned len[$]);
    int n;
    longint unsigned wt[$];
    int parent[$];
    bit alive[$];
    n = freq.size();
    len.delete();
    for (int i = 0; i < n; i++) begin
      wt.push_back(freq[i]); parent.push_back(-1); alive.push_back(1);
    end
    for (int m = 0; m < n - 1; m++) begin
      int a, b;
      a = -1; b = -1;
      for (int i = 0; i < wt.size(); i++) if (alive[i]) begin
        if (a < 0 || wt[i] < wt[a]) begin b = a; a = i; end
        else if (b < 0 || wt[i] < wt[b]) b = i;
      end
      wt.push_back(wt[a] + wt[b]); parent.push_back(-1); alive.push_back(1);
      parent[a] = wt.size() - 1; parent[b] = wt.size() - 1;
      alive[a] = 0; alive[b] = 0;
    end
    for (int i = 0; i < n; i++) begin
      int d, j;
      d = 0; j = i;
      while (parent[j] >= 0) begin j = parent[j]; d++; end
      len.push_back((n == 1) ? 1 : d);
    end
  endfunction

  // Code generation as the software side does it after sampling: the MFVs
  // (vals, with their counts) and the escape, whose frequency is that of all
  // other values (esc_freq), get a Huffman code. If a code would exceed
  // MAX_CL bits, every frequency is raised to a minimum that doubles until
  // it fits. Symbols are then sorted by length (stable) and given canonical
  // codes. Returns the longest code length.
  function automatic int build_code_huffman(logic [SL-1:0] vals[$], longint unsigned cnts[$],
                                            longint unsigned esc_freq);
    longint unsigned f[$], minf;
    int unsigned len[$];
    int unsigned order[$];
    int unsigned maxl;
    logic [MAX_CL-1:0] c;
    f = cnts;
    f.push_back(esc_freq > 0 ? esc_freq : 1);       // escape is the last entry
    minf = 0;
    forever begin
      longint unsigned g[$];
      foreach (f[i]) g.push_back(f[i] > minf ? f[i] : minf);
      huffman_lengths(g, len);
      maxl = 0;
      foreach (len[i]) if (len[i] > maxl) maxl = len[i];
      if (maxl <= MAX_CL) break;
      minf = (minf == 0) ? 1 : minf * 2;
    end
    // stable sort by length
    for (int unsigned l = 1; l <= MAX_CL; l++)
      foreach (len[i]) if (len[i] == l) order.push_back(i);
    idx_of.delete();
    n_code = order.size();
    c = '0;
    for (int unsigned r = 0; r < n_code; r++) begin
      clen[r] = len[order[r]];
      if (r > 0) c = (c + 1'b1) << (clen[r] - clen[r-1]);
      code[r] = c;
      if (order[r] == vals.size()) begin
        esc_r   = r;
        cval[r] = '0;
      end else begin
        cval[r] = vals[order[r]];
        idx_of[cval[r]] = int'(r);
      end
    end
    return int'(maxl);
  endfunction

  // Configuration writes for all tables.
  function automatic void cfg_list(ref cfg_wr_t q[$]);
    int unsigned ways_used [CLUT_SETS];
    cfg_wr_t w;
    q.delete();
    foreach (ways_used[s]) ways_used[s] = 0;
    // clear all c-LUT entries, then fill
    for (int s = 0; s < CLUT_SETS; s++)
      for (int k = 0; k < CLUT_WAYS; k++) begin
        w = '0; w.we = 1; w.sel = CFG_CLUT; w.addr = 11'(s * 8 + k);
        q.push_back(w);
      end
    for (int unsigned r = 0; r < n_code; r++) begin
      int unsigned s;
      if (r == esc_r) continue;
      s = int'(cval[r][6:0]);
      w = '0; w.we = 1; w.sel = CFG_CLUT;
      w.addr = 11'(s * 8 + ways_used[s]);
      w.data = {1'b0, 1'b1, cval[r][15:7], code[r], 5'(clen[r])};
      ways_used[s]++;
      q.push_back(w);
    end
    w = '0; w.we = 1; w.sel = CFG_ESC; w.data = 36'({code[esc_r], 5'(clen[esc_r])});
    q.push_back(w);
    for (int l = 1; l <= MAX_CL; l++) begin
      int first;
      first = -1;
      for (int unsigned r = 0; r < n_code; r++)
        if (clen[r] == l && first < 0) first = int'(r);
      w = '0; w.we = 1; w.sel = CFG_FCW; w.addr = 11'(l);
      if (first >= 0) w.data = 36'({1'b1, code[first]});
      q.push_back(w);
      w = '0; w.we = 1; w.sel = CFG_OFS; w.addr = 11'(l);
      if (first >= 0) w.data = 36'(code[first] - MAX_CL'(first));
      q.push_back(w);
    end
    for (int unsigned r = 0; r < n_code; r++) begin
      if (r == esc_r) continue;
      w = '0; w.we = 1; w.sel = CFG_DLUT; w.addr = 11'(r); w.data = 36'(cval[r]);
      q.push_back(w);
    end
  endfunction

  // Expected FCW-table entry ({valid, FCW}) and offset of code length l.
  function automatic void tbl_expect(int l, output logic [MAX_CL:0] fcw,
                                     output logic [MAX_CL-1:0] ofs);
    int first;
    first = -1;
    for (int unsigned r = 0; r < n_code; r++)
      if (clen[r] == l && first < 0) first = int'(r);
    fcw = '0;
    ofs = '0;
    if (first >= 0) begin
      fcw = {1'b1, code[first]};
      ofs = code[first] - MAX_CL'(first);
    end
  endfunction

  function automatic logic [SL-1:0] sym_of(block_t b, int k);
    return b[BLOCK_BITS - 1 - SL * k -: SL];
  endfunction

  // Reference of the compressed format. Returns the stream length in bits.
  function automatic int ref_compress(block_t b, int nway, output block_t cb,
                                      output int bytes, output logic [1:0] meta);
    bit q[$];
    int hdr_raw, hdr_bits, ws;
    int ptr [8];
    hdr_raw  = (nway - 1) * PTR_W;
    hdr_bits = (hdr_raw + 7) / 8 * 8;
    ws = NSYM / nway;
    for (int i = 0; i < hdr_bits; i++) q.push_back(0);
    for (int k = 0; k < NSYM; k++) begin
      logic [SL-1:0] s;
      if (k % ws == 0 && k != 0) begin
        while (q.size() % 8 != 0) q.push_back(0);
        ptr[k / ws] = q.size() / 8;
      end
      s = sym_of(b, k);
      if (idx_of.exists(s)) begin
        int r;
        r = idx_of[s];
        for (int i = int'(clen[r]) - 1; i >= 0; i--) q.push_back(code[r][i]);
      end else begin
        for (int i = int'(clen[esc_r]) - 1; i >= 0; i--) q.push_back(code[esc_r][i]);
        for (int i = SL - 1; i >= 0; i--) q.push_back(s[i]);
      end
    end
    for (int w = 1; w < nway; w++)
      for (int i = 0; i < PTR_W; i++)
        q[(w - 1) * PTR_W + i] = ptr[w][PTR_W - 1 - i];
    bytes = (q.size() + 7) / 8;
    if (bytes <= LIMIT_BYTES) begin
      cb = '0;
      for (int i = 0; i < q.size() && i < BLOCK_BITS; i++) cb[BLOCK_BITS - 1 - i] = q[i];
      meta = 2'((bytes - 1) / MAG_BYTES);
    end else begin
      cb = b;
      meta = META_RAW;
    end
    return q.size();
  endfunction

  // Test block: each symbol is an MFV with probability pct/100, else random.
  // MFVs are drawn with a skew toward the short codes.
  function automatic block_t gen_block(int pct);
    block_t b;
    for (int k = 0; k < NSYM; k++) begin
      logic [SL-1:0] s;
      if (int'($urandom_range(99)) < pct && n_code > 1) begin
        int unsigned r;
        case ($urandom_range(3))
          0: r = 1 + $urandom_range((n_code > 3 ? 2 : n_code - 1) - 1);
          1: r = 1 + $urandom_range((n_code > 35 ? 34 : n_code - 1) - 1);
          default: r = 1 + $urandom_range(n_code - 2);
        endcase
        s = cval[r];
      end else begin
        s = SL'($urandom);
      end
      b[BLOCK_BITS - 1 - SL * k -: SL] = s;
    end
    return b;
  endfunction

endpackage
