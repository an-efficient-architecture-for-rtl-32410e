// dwt_ref_pkg: behavioural reference for the testbenches of the 2-D DWT
// engine, written straight from the filter equations rather than from the
// hardware structure.
//
// One level of the separable transform, with zero extension at the top and
// left image edges and causal filters decimated on the odd samples:
//   L(r,n)  = floor( sum_i a(i) * x(r, 2n+1-i) / 2^F )      (rows)
//   LL(k,n) = floor( sum_i a(i) * L(2k+1-i, n) / 2^F )      (columns)
// and likewise with b for the high-pass outputs. Every result is wrapped to
// DW bits, as the hardware keeps DW-bit samples. Images are flat dynamic
// arrays in raster order with an explicit side length.
package dwt_ref_pkg;
  import dwt_pkg::*;

  function automatic longint wrapw(input longint v, input int w);
    longint m = (64'sd1 <<< w);
    longint r = v & (m - 1);
    if (r >= (m >>> 1)) r -= m;
    return r;
  endfunction

  // 1-D decimation filter of a sequence of length n.
  function automatic longint filt(input longint x[], input int n, input int idx,
                                  input coef_vec_t c, input int k, input int dw);
    longint acc = 0;
    for (int i = 0; i < k; i++) begin
      int p = 2 * idx + 1 - i;
      if (p >= 0 && p < n) acc += longint'(c[i]) * x[p];
    end
    return wrapw(acc >>> COEF_FRAC, dw);
  endfunction

  // One decomposition level of a w x w image.
  function automatic void level(input longint x[], input int w, input int k,
                                input coef_vec_t lo, input coef_vec_t hi,
                                input int dw,
                                output longint ll[], output longint lh[],
                                output longint hl[], output longint hh[]);
    int h = w / 2;
    longint lrow[], hrow[], row[], lcol[], hcol[];
    lrow = new[w * h];
    hrow = new[w * h];
    row  = new[w];
    for (int r = 0; r < w; r++) begin
      for (int c = 0; c < w; c++) row[c] = x[r * w + c];
      for (int n = 0; n < h; n++) begin
        lrow[r * h + n] = filt(row, w, n, lo, k, dw);
        hrow[r * h + n] = filt(row, w, n, hi, k, dw);
      end
    end
    ll = new[h * h];
    lh = new[h * h];
    hl = new[h * h];
    hh = new[h * h];
    lcol = new[w];
    hcol = new[w];
    for (int n = 0; n < h; n++) begin
      for (int r = 0; r < w; r++) begin
        lcol[r] = lrow[r * h + n];
        hcol[r] = hrow[r * h + n];
      end
      for (int q = 0; q < h; q++) begin
        ll[q * h + n] = filt(lcol, w, q, lo, k, dw);
        lh[q * h + n] = filt(lcol, w, q, hi, k, dw);
        hl[q * h + n] = filt(hcol, w, q, lo, k, dw);
        hh[q * h + n] = filt(hcol, w, q, hi, k, dw);
      end
    end
  endfunction

endpackage
