// h264_ref_pkg: reference model of the H.264 integer transforms and of the
// flat-matrix quantizer, written independently of the RTL for the
// testbenches. Blocks are plain int arrays m[row][col]; nothing saturates.
//
// Forward 4x4  : Y = C1 X C1^T with C1 = [1 1 1 1; 2 1 -1 -2; 1 -1 -1 1; 1 -2 2 -1]
// Forward 8x8  : the butterfly of the common reference encoder, rows then columns
// Inverse 4x4 / 8x8 : the H.264 decoding process, rows then columns, then
//                (x + 32) >> 6
// Quantization : Z = sign(W) (|W| MF + f) >> qbits; rescaling W' = Z V << qp/6
//                (4x4) or (Z V8 << qp/6 + 2) >> 2 (8x8).
package h264_ref_pkg;

  typedef int blk_t [8][8];

  function automatic blk_t fwd4(blk_t x);
    int c [4][4] = '{'{1, 1, 1, 1}, '{2, 1, -1, -2}, '{1, -1, -1, 1}, '{1, -2, 2, -1}};
    blk_t y;
    for (int bi = 0; bi < 8; bi += 4)
      for (int bj = 0; bj < 8; bj += 4)
        for (int u = 0; u < 4; u++)
          for (int v = 0; v < 4; v++) begin
            int s = 0;
            for (int i = 0; i < 4; i++)
              for (int j = 0; j < 4; j++)
                s += c[u][i] * x[bi+i][bj+j] * c[v][j];
            y[bi+u][bj+v] = s;
          end
    return y;
  endfunction

  typedef int vec8_t [8];

  function automatic vec8_t fwd8_1d(vec8_t p);
    vec8_t o;
    int a0, a1, a2, a3, b0, b1, b2, b3, b4, b5, b6, b7;
    a0 = p[0] + p[7]; a1 = p[1] + p[6]; a2 = p[2] + p[5]; a3 = p[3] + p[4];
    b0 = a0 + a3; b1 = a1 + a2; b2 = a0 - a3; b3 = a1 - a2;
    a0 = p[0] - p[7]; a1 = p[1] - p[6]; a2 = p[2] - p[5]; a3 = p[3] - p[4];
    b4 = a1 + a2 + ((a0 >>> 1) + a0);
    b5 = a0 - a3 - ((a2 >>> 1) + a2);
    b6 = a0 + a3 - ((a1 >>> 1) + a1);
    b7 = a1 - a2 + ((a3 >>> 1) + a3);
    o[0] = b0 + b1;          o[4] = b0 - b1;
    o[2] = b2 + (b3 >>> 1);  o[6] = (b2 >>> 1) - b3;
    o[1] = b4 + (b7 >>> 2);  o[3] = b5 + (b6 >>> 2);
    o[5] = b6 - (b5 >>> 2);  o[7] = (b4 >>> 2) - b7;
    return o;
  endfunction

  function automatic vec8_t inv8_1d(vec8_t d);
    vec8_t e, f, g;
    e[0] = d[0] + d[4];
    e[1] = -d[3] + d[5] - d[7] - (d[7] >>> 1);
    e[2] = d[0] - d[4];
    e[3] = d[1] + d[7] - d[3] - (d[3] >>> 1);
    e[4] = (d[2] >>> 1) - d[6];
    e[5] = -d[1] + d[7] + d[5] + (d[5] >>> 1);
    e[6] = d[2] + (d[6] >>> 1);
    e[7] = d[3] + d[5] + d[1] + (d[1] >>> 1);
    f[0] = e[0] + e[6];  f[1] = e[1] + (e[7] >>> 2);
    f[2] = e[2] + e[4];  f[3] = e[3] + (e[5] >>> 2);
    f[4] = e[2] - e[4];  f[5] = (e[3] >>> 2) - e[5];
    f[6] = e[0] - e[6];  f[7] = e[7] - (e[1] >>> 2);
    g[0] = f[0] + f[7];  g[1] = f[2] + f[5];
    g[2] = f[4] + f[3];  g[3] = f[6] + f[1];
    g[4] = f[6] - f[1];  g[5] = f[4] - f[3];
    g[6] = f[2] - f[5];  g[7] = f[0] - f[7];
    return g;
  endfunction

  // two 4-point inverse transforms on elements 0-3 and 4-7
  function automatic vec8_t inv4_1d(vec8_t d);
    vec8_t o;
    for (int b = 0; b < 8; b += 4) begin
      int e0 = d[b] + d[b+2];
      int e1 = d[b] - d[b+2];
      int e2 = (d[b+1] >>> 1) - d[b+3];
      int e3 = d[b+1] + (d[b+3] >>> 1);
      o[b]   = e0 + e3;
      o[b+1] = e1 + e2;
      o[b+2] = e1 - e2;
      o[b+3] = e0 - e3;
    end
    return o;
  endfunction

  function automatic blk_t fwd8(blk_t x);
    blk_t t, y;
    vec8_t v;
    for (int i = 0; i < 8; i++) begin
      v = fwd8_1d(x[i]);
      t[i] = v;
    end
    for (int j = 0; j < 8; j++) begin
      vec8_t c;
      for (int i = 0; i < 8; i++) c[i] = t[i][j];
      v = fwd8_1d(c);
      for (int i = 0; i < 8; i++) y[i][j] = v[i];
    end
    return y;
  endfunction

  function automatic blk_t inv(blk_t x, bit sz8);
    blk_t t, y;
    vec8_t v;
    for (int i = 0; i < 8; i++) begin
      v = sz8 ? inv8_1d(x[i]) : inv4_1d(x[i]);
      t[i] = v;
    end
    for (int j = 0; j < 8; j++) begin
      vec8_t c;
      for (int i = 0; i < 8; i++) c[i] = t[i][j];
      v = sz8 ? inv8_1d(c) : inv4_1d(c);
      for (int i = 0; i < 8; i++) y[i][j] = (v[i] + 32) >>> 6;
    end
    return y;
  endfunction

  // quantizer factors for coefficient (i,j)
  function automatic int mf_at(bit sz8, int qm, int i, int j);
    int m4 [6][3] = '{'{13107, 5243, 8066}, '{11916, 4660, 7490}, '{10082, 4194, 6554},
                      '{9362, 3647, 5825}, '{8192, 3355, 5243}, '{7282, 2893, 4559}};
    // 8x8: the [0][0], [1][1], [2][2], [0][1], [0][2], [1][2] entries of the
    // reference encoder's 8x8 matrix
    int m8 [6][6] = '{'{13107, 11428, 20972, 12222, 16777, 15481},
                      '{11916, 10826, 19174, 11058, 14980, 14290},
                      '{10082, 8943, 15978, 9675, 12710, 11985},
                      '{9362, 8228, 14913, 8931, 11984, 11259},
                      '{8192, 7346, 13159, 7740, 10486, 9777},
                      '{7282, 6428, 11570, 6830, 9118, 8640}};
    if (!sz8) begin
      int a = i % 2, b = j % 2;
      return m4[qm][(a == 0 && b == 0) ? 0 : (a == 1 && b == 1) ? 1 : 2];
    end
    return m8[qm][cls8(i, j)];
  endfunction

  function automatic int v_at(bit sz8, int qm, int i, int j);
    int t4 [6][3] = '{'{10, 16, 13}, '{11, 18, 14}, '{13, 20, 16},
                      '{14, 23, 18}, '{16, 25, 20}, '{18, 29, 23}};
    int t8 [6][6] = '{'{20, 18, 32, 19, 25, 24}, '{22, 19, 35, 21, 28, 26},
                      '{26, 23, 42, 24, 33, 31}, '{28, 25, 45, 26, 35, 33},
                      '{32, 28, 51, 30, 40, 38}, '{36, 32, 58, 34, 46, 43}};
    if (!sz8) begin
      int a = i % 2, b = j % 2;
      return t4[qm][(a == 0 && b == 0) ? 0 : (a == 1 && b == 1) ? 1 : 2];
    end
    return t8[qm][cls8(i, j)];
  endfunction

  // 8x8 position class: 0 (0,0)-like, 1 odd/odd, 2 (2,2)-like,
  // 3 (0,odd)-like, 4 (0,2)-like, 5 (odd,2)-like
  function automatic int cls8(int i, int j);
    int a = i % 4, b = j % 4;
    if (a == 0 && b == 0) return 0;
    if (i % 2 == 1 && j % 2 == 1) return 1;
    if (a == 2 && b == 2) return 2;
    if ((a == 0 && j % 2 == 1) || (i % 2 == 1 && b == 0)) return 3;
    if ((a == 0 && b == 2) || (a == 2 && b == 0)) return 4;
    return 5;
  endfunction

  function automatic blk_t quant(blk_t w, bit sz8, int qp, bit intra);
    blk_t z;
    int qbits = (sz8 ? 16 : 15) + qp / 6;
    longint f = (longint'(1) << qbits) / (intra ? 3 : 6);
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        longint a = w[i][j] < 0 ? -w[i][j] : w[i][j];
        int m = int'((a * mf_at(sz8, qp % 6, i, j) + f) >> qbits);
        z[i][j] = w[i][j] < 0 ? -m : m;
      end
    return z;
  endfunction

  function automatic blk_t dequant(blk_t z, bit sz8, int qp);
    blk_t w;
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        int p = z[i][j] * v_at(sz8, qp % 6, i, j) * (1 << (qp / 6));
        w[i][j] = sz8 ? ((p + 2) >>> 2) : p;
      end
    return w;
  endfunction

endpackage
