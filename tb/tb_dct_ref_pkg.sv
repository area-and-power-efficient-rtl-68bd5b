// tb_dct_ref_pkg: reference model of the approximate DCTs for the testbenches.
//
// The 8-point matrix T8 is written out entry by entry; the 16-point matrix
// T16 is assembled from it as P16 * diag(T8, T8) * B16, with B16 the input
// butterfly [I J; J -I] and P16 the even/odd interleave of the outputs. All
// products are plain integer matrix arithmetic, reduced to 16 bits at the end.
package tb_dct_ref_pkg;

  localparam int T8 [8][8] = '{
    '{1, 0, 0, 0, 0, 0, 0,  1},
    '{1, 1, 0, 0, 0, 0, 1,  1},
    '{0, 0, 1, 0, 0, 1, 0,  0},
    '{0, 0, 1, 1, 1, 1, 0,  0},
    '{0, 0, 1, 1,-1,-1, 0,  0},
    '{0, 0, 1, 0, 0,-1, 0,  0},
    '{1, 1, 0, 0, 0, 0,-1, -1},
    '{1, 0, 0, 0, 0, 0, 0, -1}
  };

  // entry (r, c) of the N-point matrix, N = 8 or 16
  function automatic int tmat(int n, int r, int c);
    int k;
    if (n == 8) return T8[r][c];
    k = r / 2;
    if (r % 2 == 0) return (c < 8) ? T8[k][c]     : T8[k][15-c];
    else            return (c < 8) ? T8[k][7-c]   : -T8[k][c-8];
  endfunction

  // y = T * x for an N-point vector (n <= 16), 16-bit wrap
  function automatic void dct1d(int n, input int x [16], output int y [16]);
    for (int r = 0; r < 16; r++) begin
      int acc = 0;
      if (r < n) for (int c = 0; c < n; c++) acc += tmat(n, r, c) * x[c];
      y[r] = int'(shortint'(acc));
    end
  endfunction

  // Z = T * S * T' for an n x n block
  function automatic void dct2d(int n, input int s [16][16], output int z [16][16]);
    int tmp [16][16];
    for (int r = 0; r < n; r++)
      for (int c = 0; c < n; c++) begin
        int acc = 0;
        for (int j = 0; j < n; j++) acc += s[r][j] * tmat(n, c, j);
        tmp[r][c] = acc;              // row transform: tmp = S * T'
      end
    for (int v = 0; v < n; v++)
      for (int u = 0; u < n; u++) begin
        int acc = 0;
        for (int j = 0; j < n; j++) acc += tmat(n, v, j) * tmp[j][u];
        z[v][u] = int'(shortint'(acc));
      end
  endfunction

endpackage
