// dwt53_ref_pkg: reference model of the reversible 5/3 lifting wavelet
// transform, for the testbenches.
//
// Written directly from the lifting equations with explicit floor
// division, independent of the RTL's shift-based processing elements.
// Signals are int arrays; a 2-D image of size n x n is stored row-major
// (index r*n + c). Edges use whole-sample symmetric extension.
package dwt53_ref_pkg;

  typedef int arr_t[];

  function automatic int floordiv(int a, int d);
    if (a >= 0) return a / d;
    return -((-a + d - 1) / d);
  endfunction

  // H = x_odd - floor((x_left + x_right)/2)
  function automatic int predict(int xo, int xl, int xr);
    return xo - floordiv(xl + xr, 2);
  endfunction

  // L = x_even + floor((h_left + h_right + 2)/4)
  function automatic int update(int xe, int hl, int hr);
    return xe + floordiv(hl + hr + 2, 4);
  endfunction

  // 1-D forward transform of x[0..2m-1] into lo[0..m-1], hi[0..m-1].
  function automatic void fwd1d(input arr_t x, output arr_t lo, output arr_t hi);
    int n = x.size();
    int m = n / 2;
    lo = new[m];
    hi = new[m];
    for (int j = 0; j < m; j++) begin
      int xr = (2*j + 2 < n) ? x[2*j + 2] : x[n - 2];
      hi[j] = predict(x[2*j + 1], x[2*j], xr);
    end
    for (int j = 0; j < m; j++) begin
      int hl = (j > 0) ? hi[j - 1] : hi[0];
      lo[j] = update(x[2*j], hi[j], hl);
    end
  endfunction

  // 1-D inverse transform.
  function automatic void inv1d(input arr_t lo, input arr_t hi, output arr_t x);
    int m = lo.size();
    int n = 2 * m;
    x = new[n];
    for (int j = 0; j < m; j++) begin
      int hl = (j > 0) ? hi[j - 1] : hi[0];
      x[2*j] = lo[j] - floordiv(hi[j] + hl + 2, 4);
    end
    for (int j = 0; j < m; j++) begin
      int xr = (2*j + 2 < n) ? x[2*j + 2] : x[n - 2];
      x[2*j + 1] = hi[j] + floordiv(x[2*j] + xr, 2);
    end
  endfunction

  // Row transform of an n x n image: L and H halves, each n rows x m cols.
  function automatic void rows_fwd(input arr_t img, input int n,
                                   output arr_t l, output arr_t h);
    int m = n / 2;
    l = new[n * m];
    h = new[n * m];
    for (int r = 0; r < n; r++) begin
      arr_t x, lo, hi;
      x = new[n];
      for (int c = 0; c < n; c++) x[c] = img[r*n + c];
      fwd1d(x, lo, hi);
      for (int j = 0; j < m; j++) begin
        l[r*m + j] = lo[j];
        h[r*m + j] = hi[j];
      end
    end
  endfunction

  // Column transform of an n-row x m-col array into low and high halves,
  // each m x m.
  function automatic void cols_fwd(input arr_t a, input int n,
                                   output arr_t lo2, output arr_t hi2);
    int m = n / 2;
    lo2 = new[m * m];
    hi2 = new[m * m];
    for (int j = 0; j < m; j++) begin
      arr_t x, lo, hi;
      x = new[n];
      for (int r = 0; r < n; r++) x[r] = a[r*m + j];
      fwd1d(x, lo, hi);
      for (int i = 0; i < m; i++) begin
        lo2[i*m + j] = lo[i];
        hi2[i*m + j] = hi[i];
      end
    end
  endfunction

  function automatic void cols_inv(input arr_t lo2, input arr_t hi2, input int n,
                                   output arr_t a);
    int m = n / 2;
    a = new[n * m];
    for (int j = 0; j < m; j++) begin
      arr_t lo, hi, x;
      lo = new[m];
      hi = new[m];
      for (int i = 0; i < m; i++) begin
        lo[i] = lo2[i*m + j];
        hi[i] = hi2[i*m + j];
      end
      inv1d(lo, hi, x);
      for (int r = 0; r < n; r++) a[r*m + j] = x[r];
    end
  endfunction

  // One level of the 2-D forward transform.
  function automatic void fwd2d(input arr_t img, input int n,
                                output arr_t ll, output arr_t lh,
                                output arr_t hl, output arr_t hh);
    arr_t l, h;
    rows_fwd(img, n, l, h);
    cols_fwd(l, n, ll, lh);
    cols_fwd(h, n, hl, hh);
  endfunction

  // One level of the 2-D inverse transform.
  function automatic void inv2d(input arr_t ll, input arr_t lh,
                                input arr_t hl, input arr_t hh, input int n,
                                output arr_t img);
    arr_t l, h;
    int m = n / 2;
    cols_inv(ll, lh, n, l);
    cols_inv(hl, hh, n, h);
    img = new[n * n];
    for (int r = 0; r < n; r++) begin
      arr_t lo, hi, x;
      lo = new[m];
      hi = new[m];
      for (int j = 0; j < m; j++) begin
        lo[j] = l[r*m + j];
        hi[j] = h[r*m + j];
      end
      inv1d(lo, hi, x);
      for (int c = 0; c < n; c++) img[r*n + c] = x[c];
    end
  endfunction

endpackage
