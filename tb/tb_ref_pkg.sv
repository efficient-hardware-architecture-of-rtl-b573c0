// tb_ref_pkg: reference model for the testbenches.
//
// coef(N, k, n) gives the HEVC integer DCT matrix entry C_N[k][n] for
// N = 4, 8, 16, derived from the 32-point basis: C_N[k][n] = C32[k*32/N][n],
// and C32[r][n] = a(r*(2n+1) mod 128), where a() folds the cosine table
// T[i] (the first column of the 32-point matrix, ~ 64*sqrt(2)*cos(i*pi/64))
// into the four quadrants. Row 0 is 64 throughout.
// This is computed independently of the shift-and-add datapath under test.
package tb_ref_pkg;

  localparam int T [33] = '{64, 90, 90, 90, 89, 88, 87, 85, 83, 82, 80, 78, 75, 73, 70, 67,
                            64, 61, 57, 54, 50, 46, 43, 38, 36, 31, 25, 22, 18, 13,  9,  4, 0};

  function automatic int cos_tab(int i);
    i = i % 128;
    if (i <= 32) return  T[i];
    if (i <= 64) return -T[64 - i];
    if (i <= 96) return -T[i - 64];
    return T[128 - i];
  endfunction

  function automatic int coef(int n_pts, int k, int n);
    int r;
    r = k * (32 / n_pts);
    if (r == 0) return 64;
    return cos_tab(r * (2 * n + 1));
  endfunction

  // 1-D N-point forward transform of v[0..N-1]
  function automatic void dct1d(int n_pts, input int v [16], output int r [16]);
    for (int k = 0; k < 16; k++) begin
      r[k] = 0;
      if (k < n_pts)
        for (int n = 0; n < n_pts; n++) r[k] += coef(n_pts, k, n) * v[n];
    end
  endfunction

  function automatic int size_points(int s);
    return (s == 0) ? 4 : (s == 1) ? 8 : 16;
  endfunction

endpackage
