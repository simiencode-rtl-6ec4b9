// simi_ref_pkg: bit-serial reference model of the similarity encoding, for the
// testbenches only.
//
// It restates the coding rules independently of the RTL: the mask bit is 1 when
// twice the count of ones exceeds the number of words; the body is written with
// a moving bit cursor (prefix, mask, tags, non-zero sub-words) and read back the
// same way; the zero-line test compares every bit with the bit one word-length
// earlier. It also holds a generator of test lines with controllable similarity.
package simi_ref_pkg;
  import simi_pkg::*;

  typedef logic [2*LINE_BITS-1:0] wide_t;

  typedef struct {
    bit    ok;
    bit    zline;
    int    size;
    line_t body;
  } ref_cand_t;

  function automatic int gbits(int g);
    return 16 * (1 << g);
  endfunction

  // Majority mask of the line at granularity index g (word size 2 << g bytes).
  function automatic line_t ref_mask(line_t line, int g);
    int    l = gbits(g);
    int    k = LINE_BITS / l;
    line_t m = '0;
    for (int j = 0; j < l; j++) begin
      int u = 0;
      for (int i = 0; i < k; i++) u += int'(line[i*l + j]);
      if (2 * u > k) m[j] = 1'b1;
    end
    return m;
  endfunction

  // Append the low n bits of v at bit position cur.
  function automatic wide_t put(wide_t buf_in, int cur, line_t v, int n);
    wide_t b = buf_in;
    for (int i = 0; i < n; i++) b[cur + i] = v[i];
    return b;
  endfunction

  function automatic ref_cand_t ref_gran(line_t line, int g);
    ref_cand_t r;
    int    l = gbits(g);
    line_t m = ref_mask(line, g);
    line_t x;
    line_t tags = '0;
    wide_t b = '0;
    int    cur = 0;
    for (int i = 0; i < LINE_BITS; i++) x[i] = line[i] ^ m[i % l];
    b = put(b, cur, line_t'(g), 2);  cur += 2;
    b = put(b, cur, m, l);           cur += l;
    for (int s = 0; s < NUM_SUB; s++) tags[s] = (x[s*16 +: 16] != 16'h0);
    b = put(b, cur, tags, NUM_SUB);  cur += NUM_SUB;
    for (int s = 0; s < NUM_SUB; s++)
      if (tags[s]) begin
        b = put(b, cur, line_t'(x[s*16 +: 16]), 16);
        cur += 16;
      end
    r.ok = (cur < LINE_BITS);
    r.zline = 0;
    r.size = cur;
    r.body = b[LINE_BITS-1:0];
    return r;
  endfunction

  function automatic ref_cand_t ref_zero(line_t line);
    ref_cand_t r;
    r.ok = 0; r.zline = 1; r.size = 0; r.body = '0;
    for (int g = 0; g < NUM_GRAN; g++) begin
      int l = gbits(g);
      bit same = 1;
      for (int i = l; i < LINE_BITS; i++) if (line[i] != line[i - l]) same = 0;
      if (same && !r.ok) begin
        wide_t b = '0;
        b = put(b, 0, line_t'(g), 2);
        b = put(b, 2, line, l);
        r.ok = 1; r.size = 2 + l; r.body = b[LINE_BITS-1:0];
      end
    end
    return r;
  endfunction

  // Full encoder: zero unit, then 2/4/8/16-byte units, smallest strictly wins.
  function automatic void ref_encode(line_t line, output frame_t f, output int bits,
                                     output int choice);
    ref_cand_t c;
    f.coded = 0; f.zline = 0; f.body = line; bits = LINE_BITS; choice = -1;
    for (int u = 0; u < NUM_CAND; u++) begin
      c = (u == 0) ? ref_zero(line) : ref_gran(line, u - 1);
      if (c.ok && c.size < bits) begin
        f.coded = 1; f.zline = c.zline; f.body = c.body; bits = c.size; choice = u;
      end
    end
  endfunction

  // Decoder reading the body with a cursor, tag by tag; bits past the end of
  // the body read as 0.
  function automatic line_t ref_decode(frame_t f);
    line_t out;
    line_t m = '0;
    line_t tags = '0;
    int    g, l, cur;
    if (!f.coded) return f.body;
    g = int'(f.body[1:0]);
    l = gbits(g);
    cur = 2;
    for (int i = 0; i < l; i++) m[i] = f.body[cur + i];
    cur += l;
    out = '0;
    if (!f.zline) begin
      for (int i = 0; i < NUM_SUB; i++) tags[i] = f.body[cur + i];
      cur += NUM_SUB;
      for (int s = 0; s < NUM_SUB; s++)
        if (tags[s]) begin
          for (int i = 0; i < 16; i++)
            out[s*16 + i] = (cur + i < LINE_BITS) ? f.body[cur + i] : 1'b0;
          cur += 16;
        end
    end
    for (int i = 0; i < LINE_BITS; i++) out[i] = out[i] ^ m[i % l];
    return out;
  endfunction

  // Uniform random number below m. The draw goes through a variable: a bare
  // $urandom inside a larger expression is not redrawn reliably by every simulator.
  function automatic int unsigned rnd(int unsigned m);
    int unsigned r;
    r = $urandom;
    return r % m;
  endfunction

  function automatic line_t rand_line();
    line_t v;
    for (int i = 0; i < LINE_BITS / 32; i++) begin
      int unsigned r;
      r = $urandom;
      v[i*32 +: 32] = r;
    end
    return v;
  endfunction

  // Test line generator.
  //  kind 0: all zero          kind 1: one word repeated at granularity g
  //  kind 2: repeated word with nflip random 2-byte sub-words replaced
  //  kind 3: random            kind 4: small integers in 2 << g byte words
  function automatic line_t gen_line(int kind, int g, int nflip);
    int    l = gbits(g);
    line_t w = rand_line();
    line_t v = '0;
    case (kind)
      0: v = '0;
      1, 2: begin
        for (int i = 0; i < LINE_BITS; i++) v[i] = w[i % l];
        if (kind == 2)
          for (int n = 0; n < nflip; n++) begin
            int unsigned pos = rnd(NUM_SUB);
            v[pos*16 +: 16] = 16'(rnd(65536));
          end
      end
      4: begin
        for (int i = 0; i < LINE_BITS / l; i++) v[i*l +: 8] = 8'(rnd(200));
      end
      default: v = w;
    endcase
    return v;
  endfunction

endpackage
