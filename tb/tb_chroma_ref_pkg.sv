// tb_chroma_ref_pkg: reference model of the chroma converters for the
// testbenches.
//
// Works on whole lines held in queues, with no notion of clocks, so it is
// independent of the pipelines it checks. The arithmetic follows the filter
// definitions: every weight is a sum of power-of-two fractions, each term is
// the sample shifted right (truncated) and the terms are added. Lines of
// 4:2:2/4:2:0 chroma are interleaved Cb, Cr, Cb, Cr, ...
package tb_chroma_ref_pkg;

  typedef int unsigned line_t[$];

  // Horizontal decimation of one line: [1/4 1/2 1/4] centred on the even
  // pixels, left edge mirrored, or plain dropping of the odd pixels.
  function automatic line_t ref_444to422(line_t cb, line_t cr, bit drop);
    line_t o;
    for (int k = 0; k < cb.size() / 2; k++) begin
      int c = 2 * k;
      int l = (c == 0) ? 1 : c - 1;
      if (drop) begin
        o.push_back(cb[c]);
        o.push_back(cr[c]);
      end else begin
        o.push_back((cb[l] >> 2) + (cb[c] >> 1) + (cb[c+1] >> 2));
        o.push_back((cr[l] >> 2) + (cr[c] >> 1) + (cr[c+1] >> 2));
      end
    end
    return o;
  endfunction

  // Horizontal interpolation of one interleaved line into Cb and Cr lines.
  function automatic void ref_422to444(line_t chr, bit repl,
                                       output line_t cb, output line_t cr);
    int n = chr.size() / 2;   // chroma pairs = half the pixels
    cb = {};
    cr = {};
    for (int i = 0; i < 2 * n; i++) begin
      int j  = i / 2;
      int nj = (j + 1 < n) ? j + 1 : j;
      if (i % 2 == 0 || repl) begin
        cb.push_back(chr[2*j]);
        cr.push_back(chr[2*j+1]);
      end else begin
        cb.push_back((chr[2*j] >> 1) + (chr[2*nj] >> 1));
        cr.push_back((chr[2*j+1] >> 1) + (chr[2*nj+1] >> 1));
      end
    end
  endfunction

  // Vertical decimation of an even/odd line pair.
  function automatic line_t ref_422to420(line_t e, line_t o, bit drop,
                                         bit ilace, bit fodd);
    line_t r;
    foreach (e[i]) begin
      if (drop)        r.push_back(o[i]);
      else if (!ilace) r.push_back((e[i] >> 1) + (o[i] >> 1));
      else if (fodd)   r.push_back((e[i] >> 2) + (o[i] >> 1) + (o[i] >> 2));
      else             r.push_back((e[i] >> 1) + (e[i] >> 2) + (o[i] >> 2));
    end
    return r;
  endfunction

  // Weighted sum of p and c; weights given in eighths (wp + wc = 8), each
  // eighth-weight built from its binary digits as shifted terms.
  function automatic int unsigned wsum8(int unsigned p, int unsigned c,
                                        int wp, int wc);
    int unsigned s = 0;
    for (int b = 0; b < 3; b++) begin
      if (wp[2-b]) s += p >> (b + 1);
      if (wc[2-b]) s += c >> (b + 1);
    end
    return s;
  endfunction

  // Vertical interpolation: two output lines from previous and current
  // chroma lines.
  function automatic void ref_420to422(line_t p, line_t c, bit repl,
                                       bit ilace, bit fodd,
                                       output line_t first, output line_t second);
    int w1p, w1c, w2p, w2c;
    if (!ilace)    begin w1p = 6; w1c = 2; w2p = 2; w2c = 6; end
    else if (fodd) begin w1p = 3; w1c = 5; w2p = 7; w2c = 1; end
    else           begin w1p = 1; w1c = 7; w2p = 5; w2c = 3; end
    first  = {};
    second = {};
    foreach (c[i]) begin
      if (repl) begin
        first.push_back(c[i]);
        second.push_back(c[i]);
      end else begin
        first.push_back(wsum8(p[i], c[i], w1p, w1c));
        second.push_back(wsum8(p[i], c[i], w2p, w2c));
      end
    end
  endfunction

  function automatic line_t rand_line(int n, int dw);
    line_t l;
    for (int i = 0; i < n; i++) l.push_back($urandom() & ((1 << dw) - 1));
    return l;
  endfunction

  // Programmable filters: coefficients are signed with FRAC fraction bits;
  // the sum is rounded to nearest (ties up) and clamped to DW bits. Samples
  // beyond the line ends repeat the edge sample.
  typedef int coef_t[];

  function automatic int unsigned prog_round(longint acc, int frac, int dw);
    longint r = (acc + (longint'(1) << (frac - 1))) >>> frac;
    if (r < 0) return 0;
    if (r > (longint'(1) << dw) - 1) return (1 << dw) - 1;
    return int'(r);
  endfunction

  // Value of a FIR with taps coef[0..n-1] at a window whose newest sample is
  // position top of s (coef[0] on the newest), positions clamped to the line.
  function automatic int unsigned prog_fir(line_t s, coef_t coef, int n,
                                           int top, int frac, int dw);
    longint acc = 0;
    for (int i = 0; i < n; i++) begin
      int k = top - i;
      if (k < 0) k = 0;
      if (k > int'(s.size()) - 1) k = int'(s.size()) - 1;
      acc += longint'(s[k]) * longint'(coef[i]);
    end
    return prog_round(acc, frac, dw);
  endfunction

  // Programmable 4:4:4 -> 4:2:2: window centred (n - 1) / 2 behind the
  // newest sample, values of the even pixels kept, Cb first.
  function automatic line_t ref_444to422_prog(line_t cb, line_t cr, coef_t coef,
                                              int n, int frac, int dw);
    line_t o;
    int h = (n - 1) / 2;
    for (int c = 0; c < int'(cb.size()); c += 2) begin
      o.push_back(prog_fir(cb, coef, n, c + h, frac, dw));
      o.push_back(prog_fir(cr, coef, n, c + h, frac, dw));
    end
    return o;
  endfunction

  // Programmable 4:2:2 -> 4:4:4: phase 0 copies, phase 1 between samples j
  // and j+1 uses a window whose newest sample is j + n / 2.
  function automatic void ref_422to444_prog(line_t chr, coef_t coef, int n,
                                            int frac, int dw,
                                            output line_t cb, output line_t cr);
    line_t sb, sr;
    cb = {};
    cr = {};
    for (int j = 0; j < int'(chr.size()) / 2; j++) begin
      sb.push_back(chr[2*j]);
      sr.push_back(chr[2*j+1]);
    end
    foreach (sb[j]) begin
      cb.push_back(sb[j]);
      cr.push_back(sr[j]);
      cb.push_back(prog_fir(sb, coef, n, j + n / 2, frac, dw));
      cr.push_back(prog_fir(sr, coef, n, j + n / 2, frac, dw));
    end
  endfunction

  // Programmable vertical filter: lines[k] is the k-th line entering the
  // window; the value at line k is sum coef[i] * lines[k - i], lines above
  // the first one repeating it.
  typedef line_t frame_t[$];

  function automatic line_t ref_vfir_prog(frame_t lines, int k, coef_t coef,
                                          int n, int frac, int dw);
    line_t o;
    foreach (lines[k][c]) begin
      longint acc = 0;
      for (int i = 0; i < n; i++) begin
        int r = (k - i < 0) ? 0 : k - i;
        acc += longint'(lines[r][c]) * longint'(coef[i]);
      end
      o.push_back(prog_round(acc, frac, dw));
    end
    return o;
  endfunction

endpackage
