// dwt_ref_pkg: plain-array reference model of the 5/3 reversible lifting
// transform with symmetric extension, used by the DWT testbenches.
package dwt_ref_pkg;

  // floor division by a power of two for signed integers
  function automatic int fdiv(input int a, input int sh);
    return a >>> sh;
  endfunction

  // In-place 1-D transform of v[0..n-1]; returns lows in lo[], highs in hi[].
  function automatic void lift1d(input int v[], output int lo[], output int hi[]);
    int n, h;
    n = v.size();
    h = n / 2;
    lo = new[h];
    hi = new[h];
    for (int k = 0; k < h; k++) begin
      int a, b;
      a = v[2*k];
      b = (2*k + 2 < n) ? v[2*k+2] : v[n-2];
      hi[k] = v[2*k+1] - fdiv(a + b, 1);
    end
    for (int k = 0; k < h; k++) begin
      int hm;
      hm = (k == 0) ? hi[0] : hi[k-1];
      lo[k] = v[2*k] + fdiv(hm + hi[k] + 2, 2);
    end
  endfunction

  // One 2-D level on a dim x dim image stored row-major in img[].
  // Results: row-major (dim/2)^2 arrays for the four subbands.
  function automatic void dwt2d(input int img[], input int dim,
                                output int ll[], output int hl[],
                                output int lh[], output int hh[]);
    int rowl[], rowh[], tmpL[], tmpH[];
    int h;
    h = dim / 2;
    tmpL = new[dim*h];
    tmpH = new[dim*h];
    for (int r = 0; r < dim; r++) begin
      int v[];
      int lo[], hi[];
      v = new[dim];
      for (int c = 0; c < dim; c++) v[c] = img[r*dim + c];
      lift1d(v, lo, hi);
      for (int c = 0; c < h; c++) begin
        tmpL[r*h + c] = lo[c];
        tmpH[r*h + c] = hi[c];
      end
    end
    ll = new[h*h]; hl = new[h*h]; lh = new[h*h]; hh = new[h*h];
    for (int c = 0; c < h; c++) begin
      int v[], lo[], hi[];
      v = new[dim];
      for (int r = 0; r < dim; r++) v[r] = tmpL[r*h + c];
      lift1d(v, lo, hi);
      for (int r = 0; r < h; r++) begin ll[r*h + c] = lo[r]; lh[r*h + c] = hi[r]; end
      for (int r = 0; r < dim; r++) v[r] = tmpH[r*h + c];
      lift1d(v, lo, hi);
      for (int r = 0; r < h; r++) begin hl[r*h + c] = lo[r]; hh[r*h + c] = hi[r]; end
    end
  endfunction

endpackage
