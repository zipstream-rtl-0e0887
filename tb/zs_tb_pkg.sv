// zs_tb_pkg: reference models used by the ZipStream testbenches.
//
// - crc32c():     the ICAP's end-of-load check, CRC-32 with the Castagnoli
//                 polynomial 0x1EDC6F41 (0x8F6E37A0 in Koopman's notation),
//                 MSB first, initial value all ones, no final inversion.
// - gen_bitstream(): a synthetic black-box-like bitstream: a few header
//                 words, mostly-zero frames with sparse routing words, and a
//                 final CRC word.
// - compress():   a small model of the software compressor. Bytes are
//                 run-length coded (zero runs split into powers of two, at
//                 most 128), symbols are ranked by frequency and given the
//                 code words of a fixed single-side growing code shape in
//                 rank order. From the code list it derives the LUT ROM and
//                 group table exactly as the hardware expects, and packs the
//                 image: a 32-bit word count, then the code bits MSB first
//                 in 16-bit packets. It is not an optimal Huffman coder.
// - decode_cycles(): clocks the run-length decoder needs for a symbol list.
package zs_tb_pkg;
  import zs_pkg::*;

  typedef logic [31:0] word_q_t[$];
  typedef logic [15:0] pkt_q_t[$];
  typedef logic [8:0]  sym_q_t[$];

  // One code word: value right-aligned in `bits`, `len` bits long.
  typedef struct { int unsigned bits; int unsigned len; } code_t;
  typedef code_t code_q_t[$];

  // A code table with its decoder tables.
  typedef struct {
    code_q_t          codes;          // by rank
    int unsigned      gmax;
    group_desc_t      groups [NGROUPS];
    lut_entry_t       lut    [LUT_DEPTH];
    int unsigned      lut_used;
  } table_t;

  function automatic logic [31:0] crc32c(word_q_t w, int unsigned n);
    logic [31:0] c = 32'hFFFF_FFFF;
    for (int unsigned i = 0; i < n; i++)
      for (int b = 31; b >= 0; b--) begin
        logic fb = c[31] ^ w[i][b];
        c = {c[30:0], 1'b0};
        if (fb) c ^= 32'h1EDC_6F41;
      end
    return c;
  endfunction

  // words: header (sync and commands), nframes+1 frames of 41 words with a
  // few non-zero routing words, then the CRC of everything before it.
  function automatic word_q_t gen_bitstream(int unsigned nframes, int unsigned seed);
    word_q_t w;
    logic [31:0] pool [8] = '{32'h0000_0001, 32'h0000_0100, 32'h0001_0000, 32'h0100_0000,
                              32'h0000_0003, 32'h0000_8000, 32'h0002_0000, 32'h4000_0000};
    int unsigned s = seed;
    w.push_back(32'hFFFF_FFFF); w.push_back(32'hAA99_5566);
    w.push_back(32'h3000_8001); w.push_back(32'h0000_0007);
    w.push_back(32'h3000_2001); w.push_back(32'h0040_0000 + seed[15:0]);
    w.push_back(32'h3000_4000); w.push_back(32'h5000_0000 + 41 * (nframes + 1));
    for (int unsigned i = 0; i < 41 * (nframes + 1); i++) begin
      s = s * 1103515245 + 12345;
      w.push_back((s[23:21] == 3'd0) ? pool[s[27:25]] : 32'h0);
    end
    w.push_back(32'h3000_0001);
    w.push_back(crc32c(w, w.size()));
    return w;
  endfunction

  // The growing shape: group g < 5 has 2^g codes of length 2g+1; group 5
  // (all ones prefix) has 64 codes of length 11. 95 codes, 95 LUT entries.
  function automatic code_q_t shape_growing(output int unsigned gmax);
    code_q_t c;
    gmax = 5;
    for (int unsigned g = 0; g < 5; g++)
      for (int unsigned k = 0; k < (1 << g); k++)
        c.push_back('{bits: (((1 << g) - 1) << (g + 1)) | k, len: 2 * g + 1});
    for (int unsigned k = 0; k < 64; k++)
      c.push_back('{bits: (31 << 6) | k, len: 11});
    return c;
  endfunction

  // The example table of the single-side growing code (15 symbols), with the
  // first two code words 00 and 01; group 3 mixes 5- and 6-bit codes.
  function automatic code_q_t shape_example(output int unsigned gmax);
    code_q_t c;
    gmax = 5;
    c.push_back('{bits: 'b00, len: 2});     c.push_back('{bits: 'b01, len: 2});
    c.push_back('{bits: 'b1000, len: 4});   c.push_back('{bits: 'b1001, len: 4});
    c.push_back('{bits: 'b1010, len: 4});   c.push_back('{bits: 'b1011, len: 4});
    c.push_back('{bits: 'b1100, len: 4});   c.push_back('{bits: 'b1101, len: 4});
    c.push_back('{bits: 'b11100, len: 5});
    c.push_back('{bits: 'b111010, len: 6}); c.push_back('{bits: 'b111011, len: 6});
    c.push_back('{bits: 'b111100, len: 6}); c.push_back('{bits: 'b111101, len: 6});
    c.push_back('{bits: 'b111110, len: 6}); c.push_back('{bits: 'b111111, len: 6});
    return c;
  endfunction

  function automatic int unsigned lead_ones(code_t c);
    int unsigned n = 0;
    for (int i = int'(c.len) - 1; i >= 0; i--) begin
      if (c.bits[i]) n++;
      else break;
    end
    return n;
  endfunction

  function automatic int unsigned prefix_len(int unsigned g, int unsigned gmax);
    return (g == gmax) ? g : g + 1;
  endfunction

  // Derive group descriptors and LUT contents; symbols[r] goes with codes[r].
  function automatic void build_tables(ref table_t t, input sym_q_t symbols);
    int unsigned ib [NGROUPS];
    int unsigned base;
    foreach (ib[g]) ib[g] = 0;
    foreach (t.lut[i]) t.lut[i] = '0;
    foreach (t.groups[g]) t.groups[g] = '0;
    foreach (t.codes[r]) begin
      int unsigned g = lead_ones(t.codes[r]);
      if (g > t.gmax) g = t.gmax;
      if (t.codes[r].len - prefix_len(g, t.gmax) > ib[g]) ib[g] = t.codes[r].len - prefix_len(g, t.gmax);
    end
    base = 0;
    for (int unsigned g = 0; g <= t.gmax; g++) begin
      t.groups[g].base     = LUT_AW'(base);
      t.groups[g].idx_bits = IDX_W'(ib[g]);
      base += (1 << ib[g]);
    end
    t.lut_used = base;
    for (int unsigned r = 0; r < symbols.size(); r++) begin
      int unsigned g = lead_ones(t.codes[r]);
      int unsigned sl, suf, first;
      if (g > t.gmax) g = t.gmax;
      sl    = t.codes[r].len - prefix_len(g, t.gmax);
      suf   = t.codes[r].bits & ((1 << sl) - 1);
      first = suf << (ib[g] - sl);
      for (int unsigned k = 0; k < (1 << (ib[g] - sl)); k++) begin
        t.lut[t.groups[g].base + first + k].sym = symbols[r];
        t.lut[t.groups[g].base + first + k].len = LEN_W'(t.codes[r].len);
      end
    end
  endfunction

  function automatic sym_q_t rle_encode(word_q_t w);
    sym_q_t s;
    logic [7:0] bytes [$];
    foreach (w[i]) for (int b = 3; b >= 0; b--) bytes.push_back(w[i][8*b +: 8]);
    for (int i = 0; i < bytes.size(); ) begin
      if (bytes[i] != 0) begin
        s.push_back({1'b0, bytes[i]});
        i++;
      end else begin
        int n = 0;
        while (i + n < bytes.size() && bytes[i + n] == 0) n++;
        i += n;
        while (n >= 2) begin
          int p = 128;
          while (p > n) p /= 2;
          s.push_back({1'b1, 8'(p)});
          n -= p;
        end
        if (n == 1) s.push_back(9'h000);
      end
    end
    return s;
  endfunction

  // Rank symbols by frequency (ties by value) and encode. Returns 0 if the
  // alphabet does not fit the code shape.
  function automatic bit compress(input word_q_t w, ref table_t t, output pkt_q_t image,
                                  output sym_q_t syms, output int unsigned nbits);
    int unsigned cnt [512];
    int          rank_of [512];
    sym_q_t      ranked;
    logic        bitq [$];
    foreach (cnt[i]) begin cnt[i] = 0; rank_of[i] = -1; end
    syms = rle_encode(w);
    foreach (syms[i]) cnt[syms[i]]++;
    forever begin
      int best = -1;
      for (int v = 0; v < 512; v++)
        if (cnt[v] != 0 && rank_of[v] < 0 && (best < 0 || cnt[v] > cnt[best])) best = v;
      if (best < 0) break;
      rank_of[best] = ranked.size();
      ranked.push_back(9'(best));
    end
    if (ranked.size() > t.codes.size()) return 0;
    build_tables(t, ranked);
    foreach (syms[i]) begin
      code_t c = t.codes[rank_of[syms[i]]];
      for (int b = int'(c.len) - 1; b >= 0; b--) bitq.push_back(c.bits[b]);
    end
    nbits = bitq.size();
    while (bitq.size() % 16 != 0) bitq.push_back(1'b0);
    image.delete();
    image.push_back(w.size() >> 16);
    image.push_back(w.size() & 16'hFFFF);
    for (int i = 0; i < bitq.size(); i += 16) begin
      logic [15:0] p;
      for (int b = 0; b < 16; b++) p[15 - b] = bitq[i + b];
      image.push_back(p);
    end
    return 1;
  endfunction

  // Clocks the run-length decoder spends on a symbol list when never stalled.
  function automatic int unsigned decode_cycles(sym_q_t s);
    int unsigned cyc = 0, fill = 0;
    foreach (s[i]) begin
      if (!s[i][8]) begin cyc++; fill = (fill + 1) % 4; end
      else begin
        int unsigned n = s[i][7:0];
        if (n == 0) cyc++;
        while (n > 0) begin
          int unsigned z = (n < 4 - fill) ? n : 4 - fill;
          cyc++; n -= z; fill = (fill + z) % 4;
        end
      end
    end
    return cyc;
  endfunction

endpackage
