// tb_ref_pkg: reference model of the fixed-point 3-D DWT used by the testbenches.
//
// It evaluates the flipped Daubechies (9,7) lifting equations on whole arrays at once,
// with whole-sample mirror extension at both ends, in the same number format as the
// hardware (17-bit words, 2 fractional data bits, constants with 11 fractional bits,
// products and shifts rounded towards minus infinity). It knows nothing of slices,
// buffers or schedules, so it checks the hardware's data flow independently.
package tb_ref_pkg;

  localparam longint KA = -1291, KB = 1523, KC = -1368, KD = 1308, K0 = 5306, K1 = 3953;

  typedef longint arr_t[];

  function automatic longint wrap17(longint v);
    return (v <<< 47) >>> 47;
  endfunction

  function automatic longint kmul(longint x, longint k);
    return wrap17((x * k) >>> 11);
  endfunction

  // One-level 1-D transform of x[0..2n-1]; lo[i], hi[i] for i = 0..n-1.
  function automatic void lift1d(input arr_t x, output arr_t lo, output arr_t hi);
    int n = x.size() / 2;
    longint s0[], d0[], d1[], s1[], d2[], s2[];
    s0 = new[n + 1]; d0 = new[n]; d1 = new[n]; s1 = new[n + 1]; d2 = new[n]; s2 = new[n];
    lo = new[n]; hi = new[n];
    for (int i = 0; i < n; i++) begin
      s0[i] = x[2*i];
      d0[i] = x[2*i+1];
    end
    s0[n] = s0[n-1];
    for (int i = 0; i < n; i++) d1[i] = wrap17(kmul(d0[i], KA) + (s0[i] + s0[i+1]));
    for (int i = 0; i < n; i++)
      s1[i] = wrap17(kmul(s0[i], KB) + (((i == 0 ? d1[0] : d1[i-1]) + d1[i]) >>> 4));
    s1[n] = s1[n-1];
    for (int i = 0; i < n; i++) d2[i] = wrap17(kmul(d1[i], KC) + ((s1[i] + s1[i+1]) >>> 1));
    for (int i = 0; i < n; i++)
      s2[i] = wrap17(kmul(s1[i], KD) + (((i == 0 ? d2[0] : d2[i-1]) + d2[i]) >>> 1));
    for (int i = 0; i < n; i++) begin
      lo[i] = kmul(s2[i], K0);
      hi[i] = kmul(d2[i], K1);
    end
  endfunction

  // Row transform of a frame of R rows of N pixels (row-major). Returns l and h rows,
  // each R x N/2, row-major.
  function automatic void rows2d_r(input int N, input int R, input arr_t pix,
                                   output arr_t l, output arr_t h);
    arr_t x, lo, hi;
    l = new[R * N / 2]; h = new[R * N / 2];
    x = new[N];
    for (int r = 0; r < R; r++) begin
      for (int c = 0; c < N; c++) x[c] = pix[r*N + c] * 4;
      lift1d(x, lo, hi);
      for (int k = 0; k < N/2; k++) begin
        l[r*(N/2) + k] = lo[k];
        h[r*(N/2) + k] = hi[k];
      end
    end
  endfunction

  function automatic void rows2d(input int N, input arr_t pix, output arr_t l, output arr_t h);
    rows2d_r(N, N, pix, l, h);
  endfunction

  // Full 2-D transform of one frame of R rows of N pixels, returned in the order the
  // spatial processor emits it: for each output row i (0..R/2-1), N/2 pairs (LL, LH) then
  // N/2 pairs (HL, HH); element 2p is the low and 2p+1 the high coefficient of pair p.
  function automatic arr_t frame2d_r(input int N, input int R, input arr_t pix);
    arr_t l, h, col, lo, hi, res;
    arr_t lcol_lo[], lcol_hi[], hcol_lo[], hcol_hi[];
    int n = N / 2;
    rows2d_r(N, R, pix, l, h);
    res = new[N * R];
    col = new[R];
    lcol_lo = new[n]; lcol_hi = new[n]; hcol_lo = new[n]; hcol_hi = new[n];
    for (int j = 0; j < n; j++) begin
      for (int r = 0; r < R; r++) col[r] = l[r*n + j];
      lift1d(col, lo, hi);
      lcol_lo[j] = lo; lcol_hi[j] = hi;
      for (int r = 0; r < R; r++) col[r] = h[r*n + j];
      lift1d(col, lo, hi);
      hcol_lo[j] = lo; hcol_hi[j] = hi;
    end
    for (int i = 0; i < R / 2; i++)
      for (int j = 0; j < n; j++) begin
        res[i*2*N + 2*j]         = lcol_lo[j][i];
        res[i*2*N + 2*j + 1]     = lcol_hi[j][i];
        res[i*2*N + N + 2*j]     = hcol_lo[j][i];
        res[i*2*N + N + 2*j + 1] = hcol_hi[j][i];
      end
    return res;
  endfunction

  function automatic arr_t frame2d(input int N, input arr_t pix);
    return frame2d_r(N, N, pix);
  endfunction

  // Temporal transform at one pixel position over a sequence of P (even) values.
  function automatic void temporal(input arr_t seq, output arr_t lo, output arr_t hi);
    lift1d(seq, lo, hi);
  endfunction

endpackage
