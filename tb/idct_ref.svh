// idct_ref.svh: reference model of the multi-standard 2-D inverse transform,
// written from the standards' matrices independently of the RTL tables.
// M[k][n] is the 1-D matrix of x = M*X: MPEG-2 uses floor(c(n)*cos((2k+1)n*pi/16)*2^13),
// H.264 8x8 the transposed basis matrix, H.264 4x4 the matrix scaled by 2.
// ref_idct runs pass 1 on the columns, rounds by s1, then pass 2, rounds by
// s2 and clips exactly as the core is specified to.

function automatic longint ref_m(input int mode, input int k, input int n);
  real c;
  int t8 [8][8];
  int t4 [4][4];
  t8 = '{'{8, 8, 8, 8, 8, 8, 8, 8},
         '{12, 10, 6, 3, -3, -6, -10, -12},
         '{8, 4, -4, -8, -8, -4, 4, 8},
         '{10, -3, -12, -6, 6, 12, 3, -10},
         '{8, -8, -8, 8, 8, -8, -8, 8},
         '{6, -12, 3, 10, -10, -3, 12, -6},
         '{4, -8, 8, -4, -4, 8, -8, 4},
         '{3, -6, 10, -12, 12, -10, 6, -3}};
  t4 = '{'{2, 2, 2, 2}, '{2, 1, -1, -2}, '{2, -2, -2, 2}, '{1, -2, 2, -1}};
  if (mode == 0) begin
    c = $cos((2.0 * k + 1.0) * n * 3.14159265358979323846 / 16.0);
    if (n == 0) c = 0.70710678118654752440;
    // floor of the magnitude, sign applied afterwards
    if (c < 0) return -longint'($floor(-c * 8192.0));
    return longint'($floor(c * 8192.0));
  end
  if (mode == 1) return longint'(t8[n][k]);
  return longint'(t4[n][k]);
endfunction

function automatic longint ref_rnd(input longint v, input int sh);
  if (sh == 0) return v;
  return (v + (longint'(1) << (sh - 1))) >>> sh;
endfunction

// x: coefficient block X[row][col]; f: result f[row][col]
task automatic ref_idct(input int mode, input int x [8][8], output int f [8][8]);
  int n, s1, s2;
  longint y [8][8];
  longint acc, lo, hi;
  n  = (mode == 2) ? 4 : 8;
  s1 = (mode == 0) ? 10 : 0;
  s2 = (mode == 0) ? 18 : (mode == 1) ? 12 : 8;
  lo = (mode == 0) ? -256 : -32768;
  hi = (mode == 0) ? 255 : 32767;
  for (int k = 0; k < 8; k++) for (int c = 0; c < 8; c++) begin y[k][c] = 0; f[k][c] = 0; end
  for (int k = 0; k < n; k++)
    for (int c = 0; c < n; c++) begin
      acc = 0;
      for (int i = 0; i < n; i++) acc += ref_m(mode, k, i) * x[i][c];
      y[k][c] = ref_rnd(acc, s1);
    end
  for (int r = 0; r < n; r++)
    for (int k = 0; k < n; k++) begin
      acc = 0;
      for (int i = 0; i < n; i++) acc += ref_m(mode, k, i) * y[r][i];
      acc = ref_rnd(acc, s2);
      if (acc > hi) acc = hi;
      if (acc < lo) acc = lo;
      f[r][k] = int'(acc);
    end
endtask

// Double-precision 2-D IDCT of an 8x8 MPEG-2 block, rounded and clipped.
task automatic real_idct8(input int x [8][8], output int f [8][8]);
  real s, cu, cv;
  for (int r = 0; r < 8; r++)
    for (int c = 0; c < 8; c++) begin
      s = 0.0;
      for (int u = 0; u < 8; u++)
        for (int v = 0; v < 8; v++) begin
          cu = (u == 0) ? 0.70710678118654752440 : 1.0;
          cv = (v == 0) ? 0.70710678118654752440 : 1.0;
          s += cu * cv * x[u][v] *
               $cos((2.0 * r + 1.0) * u * 3.14159265358979323846 / 16.0) *
               $cos((2.0 * c + 1.0) * v * 3.14159265358979323846 / 16.0);
        end
      s = s / 4.0;
      f[r][c] = int'($floor(s + 0.5));
      if (f[r][c] > 255) f[r][c] = 255;
      if (f[r][c] < -256) f[r][c] = -256;
    end
endtask
