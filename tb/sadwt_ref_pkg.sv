// sadwt_ref_pkg: reference model of the 1-D shape-adaptive DWT used by the
// testbenches.  It works on a whole line at a time: every line segment is
// found explicitly, every lifting step reads its taps through a periodic
// symmetric extension of the segment (period 2*(n-1)), and one-point
// segments are handled as a special case, so it shares none of the
// streaming structure of the RTL.  The integer arithmetic (rounded
// products, Q1.10 constants) is the same as the hardware's, so results
// must agree bit for bit.
//
// The segment rules, subsampling and one-point handling follow the
// published algorithm; the fixed-point rounding it mirrors is this
// design's own choice.
package sadwt_ref_pkg;
  localparam int MAXN = 2048;
  typedef int line_t [MAXN];
  typedef bit mask_t [MAXN];

  localparam int A97 = -1624, B97 = -54, G97 = 904, D97 = 454;
  localparam int Z97 = 1177, IZ97 = 891, SQ2 = 1448, ISQ2 = 724;

  function automatic int wrap16(input longint v);
    return int'(shortint'(v));
  endfunction

  function automatic int fx(input int x, input int c);
    longint p;
    p = longint'(x) * c + 512;
    return wrap16(p >>> 10);
  endfunction

  // position p reflected into segment [s, e] (e > s)
  function automatic int refl(input int p, input int s, input int e);
    int per, k;
    per = 2 * (e - s);
    k = (p - s) % per;
    if (k < 0) k += per;
    if (k > e - s) k = per - k;
    return s + k;
  endfunction

  // segment start and end of every inside position; -1 outside
  function automatic void segments(input mask_t m, input int n, output line_t ss, output line_t se);
    int p, q;
    p = 0;
    while (p < n) begin
      if (!m[p]) begin ss[p] = -1; se[p] = -1; p++; end
      else begin
        q = p;
        while (q + 1 < n && m[q+1]) q++;
        for (int k = p; k <= q; k++) begin ss[k] = p; se[k] = q; end
        p = q + 1;
      end
    end
  endfunction

  // one lifting step on positions of the given parity; filt 97 or 93
  function automatic void step(inout line_t v, input mask_t m, input int n, input line_t ss,
                               input line_t se, input int par, input int kind, input int c,
                               input bit sub);
    line_t w;
    int t, s1, s3;
    w = v;
    for (int p = 0; p < n; p++) begin
      if (m[p] && (p % 2) == par && se[p] > ss[p]) begin
        s1 = v[refl(p-1, ss[p], se[p])] + v[refl(p+1, ss[p], se[p])];
        if (kind == 4) begin
          s3 = v[refl(p-3, ss[p], se[p])] + v[refl(p+3, ss[p], se[p])];
          t = wrap16((longint'(19) * s1 - 3 * s3 + 32) >>> 6);
        end else
          t = fx(s1, c);
        w[p] = sub ? wrap16(v[p] - t) : wrap16(v[p] + t);
      end
    end
    v = w;
  endfunction

  // Forward transform of a line of n samples (n even).  low/high/ml/mh/eo
  // are indexed by pair.
  function automatic void fwd(input int filt, input line_t x, input mask_t m, input int n,
                              output line_t low, output line_t high, output mask_t ml,
                              output mask_t mh, output mask_t eo);
    line_t v, ss, se;
    int zl, zh, zo;
    bit op_e, op_o;
    v = x;
    segments(m, n, ss, se);
    if (filt == 97) begin
      step(v, m, n, ss, se, 1, 2, A97, 0);
      step(v, m, n, ss, se, 0, 2, B97, 0);
      step(v, m, n, ss, se, 1, 2, G97, 0);
      step(v, m, n, ss, se, 0, 2, D97, 0);
      zl = Z97; zh = IZ97;
    end else begin
      step(v, m, n, ss, se, 1, 2, -512, 0);
      step(v, m, n, ss, se, 0, 4, 0, 0);
      zl = SQ2; zh = ISQ2;
    end
    // filt 930: (9,3) without normalisation
    zo = SQ2;
    if (filt == 930) begin zl = 1024; zh = 1024; zo = 1024; end
    for (int i = 0; i < n / 2; i++) begin
      op_e = m[2*i]   && ss[2*i]   == se[2*i];
      op_o = m[2*i+1] && ss[2*i+1] == se[2*i+1];
      eo[i] = op_o;
      ml[i] = m[2*i] | op_o;
      mh[i] = m[2*i+1] & !op_o;
      if (op_o)       low[i] = fx(v[2*i+1], zo);
      else if (op_e)  low[i] = fx(v[2*i], zo);
      else if (m[2*i]) low[i] = fx(v[2*i], zl);
      else            low[i] = 0;
      high[i] = mh[i] ? fx(v[2*i+1], zh) : 0;
    end
  endfunction

  // Inverse transform: coefficients of one line back to samples.
  function automatic void inv(input int filt, input line_t low, input line_t high,
                              input mask_t ml, input mask_t mh, input mask_t eo, input int n,
                              output line_t x, output mask_t m);
    line_t v, ss, se;
    int il, ih;
    il = (filt == 97) ? IZ97 : ISQ2;
    ih = (filt == 97) ? Z97  : SQ2;
    for (int i = 0; i < n / 2; i++) begin
      m[2*i]   = ml[i] & !eo[i];
      m[2*i+1] = mh[i] | (ml[i] & eo[i]);
    end
    segments(m, n, ss, se);
    for (int i = 0; i < n / 2; i++) begin
      v[2*i]   = (ss[2*i] == se[2*i]) ? fx(low[i], ISQ2) : fx(low[i], il);
      v[2*i+1] = eo[i] ? fx(low[i], ISQ2) : fx(high[i], ih);
    end
    if (filt == 97) begin
      step(v, m, n, ss, se, 0, 2, D97, 1);
      step(v, m, n, ss, se, 1, 2, G97, 1);
      step(v, m, n, ss, se, 0, 2, B97, 1);
      step(v, m, n, ss, se, 1, 2, A97, 1);
    end else begin
      step(v, m, n, ss, se, 0, 4, 0, 1);
      step(v, m, n, ss, se, 1, 2, -512, 1);
    end
    for (int p = 0; p < n; p++) x[p] = m[p] ? v[p] : 0;
  endfunction

  // random shape of a line: runs of inside / outside samples, lengths
  // biased to the short segments that need special boundary handling
  function automatic void rand_mask(output mask_t m, input int n, input int style);
    int p, len;
    bit in;
    p = 0;
    in = $urandom_range(0, 1);
    while (p < n) begin
      if (style == 0) len = n;
      else if (style == 1) len = $urandom_range(1, 4);
      else len = $urandom_range(1, 12);
      for (int k = 0; k < len && p < n; k++) begin m[p] = in; p++; end
      in = !in;
      if (style == 0) in = 1;
    end
  endfunction

  // In-place multi-level 2-D forward transform of a 2^lw x 2^lh frame
  // (value v, mask m, one-point bit e, index y*W+x), direct method: per
  // level rows then columns, coefficients back on the sample grid.
  function automatic void fwd2d(int filt, ref int v[], ref bit m[], ref bit e[], input int lw,
                                input int lh, input int lev);
    int wd, ht, s, nw, nh;
    line_t x, lo, hi;
    mask_t mx, ml, mh, eo;
    wd = 1 << lw; ht = 1 << lh;
    for (int j = 0; j < lev; j++) begin
      s = 1 << j; nw = wd >> j; nh = ht >> j;
      for (int r = 0; r < nh; r++) begin
        for (int k = 0; k < nw; k++) begin x[k] = v[r*s*wd + k*s]; mx[k] = m[r*s*wd + k*s]; end
        fwd(filt, x, mx, nw, lo, hi, ml, mh, eo);
        for (int i = 0; i < nw / 2; i++) begin
          v[r*s*wd + 2*i*s] = lo[i];     m[r*s*wd + 2*i*s] = ml[i];     e[r*s*wd + 2*i*s] = eo[i];
          v[r*s*wd + (2*i+1)*s] = hi[i]; m[r*s*wd + (2*i+1)*s] = mh[i]; e[r*s*wd + (2*i+1)*s] = 0;
        end
      end
      for (int c = 0; c < nw; c++) begin
        for (int k = 0; k < nh; k++) begin x[k] = v[k*s*wd + c*s]; mx[k] = m[k*s*wd + c*s]; end
        fwd(filt, x, mx, nh, lo, hi, ml, mh, eo);
        for (int i = 0; i < nh / 2; i++) begin
          v[2*i*s*wd + c*s] = lo[i];     m[2*i*s*wd + c*s] = ml[i];     e[2*i*s*wd + c*s] = eo[i];
          v[(2*i+1)*s*wd + c*s] = hi[i]; m[(2*i+1)*s*wd + c*s] = mh[i]; e[(2*i+1)*s*wd + c*s] = 0;
        end
      end
    end
  endfunction

  // Test object: an ellipse with a notch, a few holes and isolated specks,
  // so that segments of every length, one-point segments included, occur
  // in rows and columns alike.
  function automatic bit shape_at(input int xx, input int yy, input int wd, input int ht);
    real dx, dy;
    dx = (real'(xx) - 0.45 * wd) / (0.38 * wd);
    dy = (real'(yy) - 0.5 * ht) / (0.42 * ht);
    if (dx * dx + dy * dy < 1.0 && !(xx > wd / 2 && yy > ht / 2 && yy < ht / 2 + 3)) return 1'b1;
    return 1'b0;
  endfunction
endpackage
