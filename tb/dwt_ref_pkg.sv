// dwt_ref_pkg: integer reference model of the 9/7 lifting DWT, written
// from the equations with ordinary '*' arithmetic, for the testbenches.
//
// coef_mul() is the coefficient product: sign-magnitude, magnitude clamped
// to in_w-1 bits, times mantissa, rounded half away from zero, shifted,
// saturated to out_w bits. dwt_ref() applies the four lifting steps and the
// scaling to a zero-padded pixel sequence and returns low/high bands.
package dwt_ref_pkg;
  import dwt_pkg::*;

  function automatic longint sat(longint v, int w);
    longint mx = (longint'(1) << (w - 1)) - 1;
    longint mn = -(longint'(1) << (w - 1));
    return (v > mx) ? mx : (v < mn) ? mn : v;
  endfunction

  function automatic longint coef_mul(longint x, int mag, int sh, bit neg, int in_w, int out_w);
    longint m, p, mx;
    bit s = (x < 0);
    m  = s ? -x : x;
    mx = (longint'(1) << (in_w - 1)) - 1;
    if (m > mx) m = mx;
    p = m * mag;
    if (sh > 0) p = p + (longint'(1) << (sh - 1));
    p = p >>> sh;
    if (p > (longint'(1) << (out_w - 1)) - 1) p = (longint'(1) << (out_w - 1)) - 1;
    return (s ^ neg) ? -p : p;
  endfunction

  // x: pixels (length 2*n), results low[n], high[n].
  function automatic void dwt_ref(input int x[], input int dw, input int frac, input int out_w,
                                  output int low[], output int high[]);
    int n = x.size() / 2;
    int off = 4;
    int sz = n + 8;
    longint e[], o[], d1[], s1[], d2[], s2[];
    e = new[sz]; o = new[sz]; d1 = new[sz]; s1 = new[sz]; d2 = new[sz]; s2 = new[sz];
    foreach (e[i]) begin e[i] = 0; o[i] = 0; d1[i] = 0; s1[i] = 0; d2[i] = 0; s2[i] = 0; end
    for (int k = 0; k < n; k++) begin
      e[k + off] = longint'(x[2*k])   << frac;
      o[k + off] = longint'(x[2*k+1]) << frac;
    end
    for (int i = 1; i < sz - 1; i++)
      d1[i] = sat(o[i] + coef_mul(e[i] + e[i+1], ALPHA_MAG, ALPHA_SH, ALPHA_NEG, dw+1, dw), dw);
    for (int i = 1; i < sz - 1; i++)
      s1[i] = sat(e[i] + coef_mul(d1[i-1] + d1[i], BETA_MAG, BETA_SH, BETA_NEG, dw+1, dw), dw);
    for (int i = 1; i < sz - 1; i++)
      d2[i] = sat(d1[i] + coef_mul(s1[i] + s1[i+1], GAMMA_MAG, GAMMA_SH, GAMMA_NEG, dw+1, dw), dw);
    for (int i = 1; i < sz - 1; i++)
      s2[i] = sat(s1[i] + coef_mul(d2[i-1] + d2[i], DELTA_MAG, DELTA_SH, DELTA_NEG, dw+1, dw), dw);
    low = new[n]; high = new[n];
    for (int k = 0; k < n; k++) begin
      low[k]  = int'(coef_mul(s2[k + off], KSC_MAG,  KSC_SH  + frac, 1'b0, dw+1, out_w));
      high[k] = int'(coef_mul(d2[k + off], KINV_MAG, KINV_SH + frac, 1'b0, dw+1, out_w));
    end
  endfunction
  function automatic int to_pixel(longint v, int frac);
    longint r = (v + (longint'(1) << (frac - 1))) >>> frac;
    return (r < 0) ? 0 : (r > 255) ? 255 : int'(r);
  endfunction

  // Inverse: coefficient streams lo/hi (zero before index 0 and after the
  // end) back to pixels px[2n], px[2n+1].
  function automatic void idwt_ref(input int lo[], input int hi[], input int dw, input int frac,
                                   output int px[]);
    int n = lo.size();
    int off = 4;
    int sz = n + 8;
    longint s2[], d2[], s1[], d1[], e[], o[];
    s2 = new[sz]; d2 = new[sz]; s1 = new[sz]; d1 = new[sz]; e = new[sz]; o = new[sz];
    foreach (s2[i]) begin s2[i] = 0; d2[i] = 0; s1[i] = 0; d1[i] = 0; e[i] = 0; o[i] = 0; end
    for (int k = 0; k < n; k++) begin
      s2[k + off] = coef_mul(longint'(lo[k]) <<< frac, KINV_MAG, KINV_SH, 1'b0, dw+1, dw);
      d2[k + off] = coef_mul(longint'(hi[k]) <<< frac, KSC_MAG,  KSC_SH,  1'b0, dw+1, dw);
    end
    for (int i = 1; i < sz - 1; i++)
      s1[i] = sat(s2[i] + coef_mul(d2[i-1] + d2[i], DELTA_MAG, DELTA_SH, !DELTA_NEG, dw+1, dw), dw);
    for (int i = 1; i < sz - 1; i++)
      d1[i] = sat(d2[i] + coef_mul(s1[i] + s1[i+1], GAMMA_MAG, GAMMA_SH, !GAMMA_NEG, dw+1, dw), dw);
    for (int i = 1; i < sz - 1; i++)
      e[i] = sat(s1[i] + coef_mul(d1[i-1] + d1[i], BETA_MAG, BETA_SH, !BETA_NEG, dw+1, dw), dw);
    for (int i = 1; i < sz - 1; i++)
      o[i] = sat(d1[i] + coef_mul(e[i] + e[i+1], ALPHA_MAG, ALPHA_SH, !ALPHA_NEG, dw+1, dw), dw);
    px = new[2*n];
    for (int k = 0; k < n; k++) begin
      px[2*k]   = to_pixel(e[k + off], frac);
      px[2*k+1] = to_pixel(o[k + off], frac);
    end
  endfunction
endpackage
