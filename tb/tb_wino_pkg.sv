// tb_wino_pkg: reference arithmetic for the Winograd engine testbenches,
// written as plain matrix products and direct convolution so that it shares
// nothing with the hand-expanded formulas of the RTL.
//   in_xform   d' = B^T d B       (4x4 input tile)
//   out_xform  y  = A^T o A       (4x4 -> 2x2)
//   filt_xform U  = (2G) g (2G)^T (3x3 filter -> 4x4, scaled by 4 so that it
//              is an integer; an engine fed with it yields 4x the convolution)
package tb_wino_pkg;

  typedef longint t44_t [4][4];
  typedef longint t22_t [2][2];
  typedef int     g33_t [3][3];

  localparam int BT [4][4] = '{'{1, 0, -1, 0}, '{0, 1, 1, 0}, '{0, -1, 1, 0}, '{0, 1, 0, -1}};
  localparam int AT [2][4] = '{'{1, 1, 1, 0}, '{0, 1, -1, -1}};
  localparam int G2 [4][3] = '{'{2, 0, 0}, '{1, 1, 1}, '{1, -1, 1}, '{0, 0, 2}};

  function automatic t44_t in_xform(t44_t d);
    t44_t t, r;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        t[i][j] = 0;
        for (int k = 0; k < 4; k++) t[i][j] += BT[i][k] * d[k][j];
      end
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        r[i][j] = 0;
        for (int k = 0; k < 4; k++) r[i][j] += t[i][k] * BT[j][k];
      end
    return r;
  endfunction

  function automatic t22_t out_xform(t44_t o);
    longint t [2][4];
    t22_t   r;
    for (int i = 0; i < 2; i++)
      for (int j = 0; j < 4; j++) begin
        t[i][j] = 0;
        for (int k = 0; k < 4; k++) t[i][j] += AT[i][k] * o[k][j];
      end
    for (int i = 0; i < 2; i++)
      for (int j = 0; j < 2; j++) begin
        r[i][j] = 0;
        for (int k = 0; k < 4; k++) r[i][j] += t[i][k] * AT[j][k];
      end
    return r;
  endfunction

  function automatic t44_t filt_xform(g33_t g);
    longint t [4][3];
    t44_t   r;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 3; j++) begin
        t[i][j] = 0;
        for (int k = 0; k < 3; k++) t[i][j] += G2[i][k] * g[k][j];
      end
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        r[i][j] = 0;
        for (int k = 0; k < 3; k++) r[i][j] += t[i][k] * G2[j][k];
      end
    return r;
  endfunction

  // signed random value in [-mag, mag]
  function automatic int srand(int mag);
    return int'($urandom_range(2 * mag)) - mag;
  endfunction

endpackage
