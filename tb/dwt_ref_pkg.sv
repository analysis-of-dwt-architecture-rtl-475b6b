// dwt_ref_pkg: behavioural reference of the fixed-point lifting 9/7 DWT used by
// the testbenches. It computes the same integer arithmetic as the hardware
// (flipped lifting cells with K-bit truncating shifts, truncating scaling) but
// straight from the lifting equations over whole rows and columns, without any
// of the hardware's pipelining, stripes, segments or partial-result passing.
//
// 1-D convention: sequence z[0] = 0 (padding), z[i+1] = x[i]; output i holds
// lifting index n = i-1:  lo[i] = s2[i-1], hi[i] = d2[i-1].
package dwt_ref_pkg;
  import dwt_pkg::*;

  typedef int arr_t[];
  typedef arr_t img_t[];

  // largest magnitude any lifting node has produced (word length headroom)
  longint ref_peak = 0;

  function automatic int ref_cell(longint c, longint m, longint a, longint b);
    longint p, y;
    p = (c * m) >>> (COEF_FRAC + KSH);
    y = p + (a >>> KSH) + (b >>> KSH);
    if (y > ref_peak) ref_peak = y;
    if (-y > ref_peak) ref_peak = -y;
    return int'(y);
  endfunction

  function automatic int scale(longint k, longint v);
    return int'((k * v) >>> SCALE_FRAC);
  endfunction

  // one-dimensional transform of an even-length sequence
  function automatic void lift1d(input arr_t x, output arr_t lo, output arr_t hi);
    int L, H, OFF;
    int z[], d1[], s1[], d2[], s2[];
    L = x.size();
    H = L / 2;
    OFF = 4;
    z  = new[L + 1];
    d1 = new[H + OFF + 2];
    s1 = new[H + OFF + 2];
    d2 = new[H + OFF + 2];
    s2 = new[H + OFF + 2];
    z[0] = 0;
    for (int i = 0; i < L; i++) z[i+1] = x[i];
    foreach (d1[i]) begin d1[i] = 0; s1[i] = 0; d2[i] = 0; s2[i] = 0; end
    for (int n = 0; n <= H - 1; n++)
      d1[n+OFF] = ref_cell(C1, z[2*n+1], z[2*n], z[2*n+2]);
    for (int n = 0; n <= H - 1; n++)
      s1[n+OFF] = ref_cell(C2, z[2*n], d1[n-1+OFF], d1[n+OFF]);
    for (int n = -1; n <= H - 2; n++)
      d2[n+OFF] = ref_cell(C3, d1[n+OFF], s1[n+OFF], s1[n+1+OFF]);
    for (int n = -1; n <= H - 2; n++)
      s2[n+OFF] = ref_cell(C4, s1[n+OFF], d2[n-1+OFF], d2[n+OFF]);
    lo = new[H];
    hi = new[H];
    for (int i = 0; i < H; i++) begin
      lo[i] = s2[i-1+OFF];
      hi[i] = d2[i-1+OFF];
    end
  endfunction

  // one level of the 2-D transform of a square image, scaled subbands
  function automatic void dwt2d(input img_t img, output img_t ll, output img_t lh,
                                output img_t hl, output img_t hh);
    int n, h;
    img_t lr, hr;
    arr_t lo, hi, col;
    n = img.size();
    h = n / 2;
    lr = new[n];
    hr = new[n];
    for (int y = 0; y < n; y++) begin
      lift1d(img[y], lo, hi);
      lr[y] = lo;
      hr[y] = hi;
    end
    ll = new[h]; lh = new[h]; hl = new[h]; hh = new[h];
    for (int m = 0; m < h; m++) begin
      ll[m] = new[h]; lh[m] = new[h]; hl[m] = new[h]; hh[m] = new[h];
    end
    col = new[n];
    for (int c = 0; c < h; c++) begin
      for (int y = 0; y < n; y++) col[y] = lr[y][c];
      lift1d(col, lo, hi);
      for (int m = 0; m < h; m++) begin
        ll[m][c] = scale(K_LL, lo[m]);
        lh[m][c] = scale(K_LH, hi[m]);
      end
      for (int y = 0; y < n; y++) col[y] = hr[y][c];
      lift1d(col, lo, hi);
      for (int m = 0; m < h; m++) begin
        hl[m][c] = scale(K_HL, lo[m]);
        hh[m][c] = scale(K_HH, hi[m]);
      end
    end
  endfunction

  // random test image of n x n unsigned PIX_W-bit pixels: smooth ramps with
  // noise and a few hard edges, so that both low and high bands are busy
  function automatic img_t make_image(int n, int seed);
    img_t img;
    int   v;
    img = new[n];
    for (int y = 0; y < n; y++) begin
      img[y] = new[n];
      for (int x = 0; x < n; x++) begin
        v = (x * 3 + y * 5 + seed) % 200 + int'($urandom_range(0, 55));
        if (((x / 7) + (y / 5)) % 4 == 0) v = 255 - v;
        if (v < 0) v = 0;
        if (v > (1 << PIX_W) - 1) v = (1 << PIX_W) - 1;
        img[y][x] = v;
      end
    end
    return img;
  endfunction

endpackage
