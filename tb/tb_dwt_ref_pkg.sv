// tb_dwt_ref_pkg -- integer reference model of the three-level 9/7 DWT used by the top-level
// testbenches. Images are flat arrays of row stride `stride`. The arithmetic is exact:
// taps in Q1.15, exact products, (+2^14) >>> 15 rounding, saturation to 16 bits,
// whole-sample symmetric extension, pyramid layout, then |C| < thr -> 0.
// idwt3 is the matching inverse: interleave low and high halves, nine-tap synthesis
// kernel chosen by output parity, same rounding, coarsest level first, columns then rows.
package tb_dwt_ref_pkg;
  import mloa_pkg::*;

  function automatic int tap_lp(input int t);
    return LP_TAP[t].neg ? -int'(LP_TAP[t].mag) : int'(LP_TAP[t].mag);
  endfunction

  function automatic int tap_hp(input int t);
    return HP_TAP[t].neg ? -int'(HP_TAP[t].mag) : int'(HP_TAP[t].mag);
  endfunction

  function automatic int mir(input int n, input int l);
    int m;
    m = n;
    if (m < 0) m = -m;
    if (m > l - 1) m = 2 * (l - 1) - m;
    if (m < 0) m = -m;
    return m;
  endfunction

  function automatic int rsat(input longint acc);
    longint r;
    r = (acc + 16384) >>> 15;
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return int'(r);
  endfunction

  // a: image in, coefficients out (in place); returns the non-zero count after thresholding.
  function automatic int dwt3(ref int a[], input int stride, input int w, input int h,
                              input int thr);
    int b[];
    int wl, hl, nz;
    longint al, ah;
    b = new[a.size()];
    wl = w; hl = h;
    for (int lv = 0; lv < 3; lv++) begin
      for (int y = 0; y < hl; y++)
        for (int c = 0; c < wl; c += 2) begin
          al = 0; ah = 0;
          for (int t = 0; t < 9; t++) al += longint'(tap_lp(t)) * a[y*stride + mir(c+t-4, wl)];
          for (int t = 0; t < 7; t++) ah += longint'(tap_hp(t)) * a[y*stride + mir(c+t-2, wl)];
          b[y*stride + c/2]        = rsat(al);
          b[y*stride + wl/2 + c/2] = rsat(ah);
        end
      for (int x = 0; x < wl; x++)
        for (int c = 0; c < hl; c += 2) begin
          al = 0; ah = 0;
          for (int t = 0; t < 9; t++) al += longint'(tap_lp(t)) * b[mir(c+t-4, hl)*stride + x];
          for (int t = 0; t < 7; t++) ah += longint'(tap_hp(t)) * b[mir(c+t-2, hl)*stride + x];
          a[(c/2)*stride + x]        = rsat(al);
          a[(hl/2 + c/2)*stride + x] = rsat(ah);
        end
      wl /= 2; hl /= 2;
    end
    nz = 0;
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        if ((a[y*stride + x] < 0 ? -a[y*stride + x] : a[y*stride + x]) < thr) a[y*stride + x] = 0;
        if (a[y*stride + x] != 0) nz++;
      end
    return nz;
  endfunction

  function automatic int tap_sy(input bit odd, input int t);
    tap_t k;
    k = odd ? SY_ODD[t] : SY_EVEN[t];
    return k.neg ? -int'(k.mag) : int'(k.mag);
  endfunction

  // Inverse of dwt3 (without the threshold): coefficients in, samples out, in place.
  function automatic void idwt3(ref int a[], input int stride, input int w, input int h);
    int b[];
    int wl, hl, p, src;
    longint acc;
    b = new[a.size()];
    for (int lv = 2; lv >= 0; lv--) begin
      wl = w >> lv; hl = h >> lv;
      for (int x = 0; x < wl; x++)
        for (int m = 0; m < hl; m++) begin
          acc = 0;
          for (int t = 0; t < 9; t++) begin
            p = mir(m + t - 4, hl);
            src = (p % 2 == 1) ? hl/2 + p/2 : p/2;
            acc += longint'(tap_sy(m % 2 == 1, t)) * a[src*stride + x];
          end
          b[m*stride + x] = rsat(acc);
        end
      for (int y = 0; y < hl; y++)
        for (int m = 0; m < wl; m++) begin
          acc = 0;
          for (int t = 0; t < 9; t++) begin
            p = mir(m + t - 4, wl);
            src = (p % 2 == 1) ? wl/2 + p/2 : p/2;
            acc += longint'(tap_sy(m % 2 == 1, t)) * b[y*stride + src];
          end
          a[y*stride + m] = rsat(acc);
        end
    end
  endfunction

  // Synthetic 8-bit test image: smooth gradient, a bright rectangle with sharp edges and
  // pseudo-random texture, so that every sub-band receives energy.
  function automatic int pixel(input int x, input int y, input int w, input int h);
    int v;
    v = (x * 160) / w + (y * 60) / h;
    if (x > w / 4 && x < w / 2 && y > h / 3 && y < (2 * h) / 3) v = 230;
    v += int'(((x * 1103515245 + y * 12345 + x * y * 7) >>> 8) & 31) - 16;
    if (v < 0) v = 0;
    if (v > 255) v = 255;
    return v;
  endfunction
endpackage
