// tb_ref_pkg: reference models shared by the testbenches.
//
// Written from the H.264 / SVC arithmetic directly (integer butterflies of
// the reference software, flat quantization tables), not from the RTL, so
// that each block is compared against an independent model. Matrices are
// [row i][column j]; i is the vertical frequency / pixel row.
//
// The equations follow the standard; the TraDED reference decision is
// written from the decision rules. The function layout is this package's
// own choice.
package tb_ref_pkg;
  typedef int mat8_t [8][8];

  // ---------------------------------------------------------------- tables
  localparam int Q4T [6][3] = '{'{13107, 5243, 8066}, '{11916, 4660, 7490},
                                '{10082, 4194, 6554}, '{9362, 3647, 5825},
                                '{8192, 3355, 5243},  '{7282, 2893, 4559}};
  localparam int V4T [6][3] = '{'{10, 16, 13}, '{11, 18, 14}, '{13, 20, 16},
                                '{14, 23, 18}, '{16, 25, 20}, '{18, 29, 23}};
  localparam int Q8T [6][6] = '{'{13107, 11428, 20972, 12222, 16777, 15481},
                                '{11916, 10826, 19174, 11058, 14980, 14290},
                                '{10082, 8943, 15978, 9675, 12710, 11985},
                                '{9362, 8228, 14913, 8931, 11984, 11259},
                                '{8192, 7346, 13159, 7740, 10486, 9777},
                                '{7282, 6428, 11570, 6830, 9118, 8640}};
  localparam int V8T [6][6] = '{'{20, 18, 32, 19, 25, 24}, '{22, 19, 35, 21, 28, 26},
                                '{26, 23, 42, 24, 33, 31}, '{28, 25, 45, 26, 35, 33},
                                '{32, 28, 51, 30, 40, 38}, '{36, 32, 58, 34, 46, 43}};
  localparam int N4T [3] = '{16, 25, 20};
  localparam int N8T [6] = '{64, 81, 25, 72, 40, 45};

  function automatic int cls4(int i, int j);
    if (i % 2 == 0 && j % 2 == 0) return 0;
    if (i % 2 == 1 && j % 2 == 1) return 1;
    return 2;
  endfunction
  function automatic int cls8(int i, int j);
    if (i % 4 == 0 && j % 4 == 0) return 0;
    if (i % 2 == 1 && j % 2 == 1) return 1;
    if (i % 4 == 2 && j % 4 == 2) return 2;
    if ((i % 4 == 0 && j % 2 == 1) || (i % 2 == 1 && j % 4 == 0)) return 3;
    if ((i % 4 == 0 && j % 4 == 2) || (i % 4 == 2 && j % 4 == 0)) return 4;
    return 5;
  endfunction

  function automatic int sat16(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  // ------------------------------------------------------------ 1-D cores
  function automatic void f4(input int p [4], output int y [4]);
    int a0, a1, a2, a3;
    a0 = p[0] + p[3]; a1 = p[1] + p[2]; a2 = p[1] - p[2]; a3 = p[0] - p[3];
    y[0] = a0 + a1; y[1] = 2 * a3 + a2; y[2] = a0 - a1; y[3] = a3 - 2 * a2;
  endfunction
  function automatic void h4(input int p [4], output int y [4]);
    y[0] = p[0] + p[1] + p[2] + p[3];
    y[1] = p[0] + p[1] - p[2] - p[3];
    y[2] = p[0] - p[1] - p[2] + p[3];
    y[3] = p[0] - p[1] + p[2] - p[3];
  endfunction
  function automatic void i4(input int p [4], output int y [4]);
    int a0, a1, a2, a3;
    a0 = p[0] + p[2]; a1 = p[0] - p[2];
    a2 = (p[1] >>> 1) - p[3]; a3 = p[1] + (p[3] >>> 1);
    y[0] = a0 + a3; y[1] = a1 + a2; y[2] = a1 - a2; y[3] = a0 - a3;
  endfunction
  function automatic void f8(input int p [8], output int y [8]);
    int a0, a1, a2, a3, a4, a5, a6, a7, b0, b1, b2, b3, b4, b5, b6, b7;
    a0 = p[0] + p[7]; a1 = p[1] + p[6]; a2 = p[2] + p[5]; a3 = p[3] + p[4];
    b0 = a0 + a3; b1 = a1 + a2; b2 = a0 - a3; b3 = a1 - a2;
    a4 = p[0] - p[7]; a5 = p[1] - p[6]; a6 = p[2] - p[5]; a7 = p[3] - p[4];
    b4 = a5 + a6 + ((a4 >>> 1) + a4);
    b5 = a4 - a7 - ((a6 >>> 1) + a6);
    b6 = a4 + a7 - ((a5 >>> 1) + a5);
    b7 = a5 - a6 + ((a7 >>> 1) + a7);
    y[0] = b0 + b1; y[2] = b2 + (b3 >>> 1); y[4] = b0 - b1; y[6] = (b2 >>> 1) - b3;
    y[1] = b4 + (b7 >>> 2); y[3] = b5 + (b6 >>> 2); y[5] = b6 - (b5 >>> 2); y[7] = (b4 >>> 2) - b7;
  endfunction
  function automatic void i8(input int p [8], output int y [8]);
    int a0, a1, a2, a3, a4, a5, a6, a7, b0, b1, b2, b3, b4, b5, b6, b7;
    a0 = p[0] + p[4]; a4 = p[0] - p[4];
    a2 = (p[2] >>> 1) - p[6]; a6 = p[2] + (p[6] >>> 1);
    b0 = a0 + a6; b2 = a4 + a2; b4 = a4 - a2; b6 = a0 - a6;
    a1 = -p[3] + p[5] - p[7] - (p[7] >>> 1);
    a3 = p[1] + p[7] - p[3] - (p[3] >>> 1);
    a5 = -p[1] + p[7] + p[5] + (p[5] >>> 1);
    a7 = p[3] + p[5] + p[1] + (p[1] >>> 1);
    b1 = a1 + (a7 >>> 2); b7 = a7 - (a1 >>> 2);
    b3 = a3 + (a5 >>> 2); b5 = (a3 >>> 2) - a5;
    y[0] = b0 + b7; y[1] = b2 + b5; y[2] = b4 + b3; y[3] = b6 + b1;
    y[4] = b6 - b1; y[5] = b4 - b3; y[6] = b2 - b5; y[7] = b0 - b7;
  endfunction

  // ------------------------------------------------------------ 2-D blocks
  // kind: 0 forward 4x4 DCT, 1 forward 4x4 Hadamard (>>1), 2 inverse 4x4
  // (with (x+32)>>6), 3 inverse 4x4 Hadamard (no shift)
  function automatic mat8_t xf4(input mat8_t x, input int kind);
    mat8_t t, r;
    int p [4], y [4];
    t = '{default: 0};
    r = '{default: 0};
    for (int i = 0; i < 4; i++) begin
      for (int k = 0; k < 4; k++) p[k] = x[i][k];
      case (kind)
        0: f4(p, y);
        1, 3: h4(p, y);
        default: i4(p, y);
      endcase
      for (int k = 0; k < 4; k++) t[i][k] = y[k];
    end
    for (int j = 0; j < 4; j++) begin
      for (int k = 0; k < 4; k++) p[k] = t[k][j];
      case (kind)
        0: f4(p, y);
        1, 3: h4(p, y);
        default: i4(p, y);
      endcase
      for (int k = 0; k < 4; k++) begin
        case (kind)
          1: r[k][j] = y[k] >>> 1;
          2: r[k][j] = (y[k] + 32) >>> 6;
          default: r[k][j] = y[k];
        endcase
      end
    end
    return r;
  endfunction

  // inverse = 0: forward 8x8; 1: inverse 8x8 with (x+32)>>6
  function automatic mat8_t xf8(input mat8_t x, input bit inverse);
    mat8_t t, r;
    int p [8], y [8];
    for (int i = 0; i < 8; i++) begin
      for (int k = 0; k < 8; k++) p[k] = x[i][k];
      if (inverse) i8(p, y); else f8(p, y);
      for (int k = 0; k < 8; k++) t[i][k] = y[k];
    end
    for (int j = 0; j < 8; j++) begin
      for (int k = 0; k < 8; k++) p[k] = t[k][j];
      if (inverse) i8(p, y); else f8(p, y);
      for (int k = 0; k < 8; k++) r[k][j] = inverse ? ((y[k] + 32) >>> 6) : y[k];
    end
    return r;
  endfunction

  // ------------------------------------------------------ quantization
  function automatic int quant(int c, int qp, bit is8, bit is_dc, int i, int j);
    int qb, mf;
    longint f, m;
    qb = (is8 ? 16 : 15) + qp / 6;
    mf = is8 ? Q8T[qp % 6][cls8(i, j)] : Q4T[qp % 6][cls4(i, j)];
    if (is_dc) begin
      qb = qb + 1;
      mf = Q4T[qp % 6][0];
    end
    f = (longint'(1) << qb) / 3;
    m = ((c < 0 ? -longint'(c) : longint'(c)) * mf + f) >>> qb;
    if (m > 32767) m = 32767;
    return sat16(c < 0 ? -m : m);
  endfunction

  // dc_kind: 0 AC / plain, 1 luma DC, 2 chroma DC
  function automatic int dequant(int l, int qp, bit is8, int dc_kind, int i, int j);
    longint v;
    int d;
    d = qp / 6;
    if (is8) begin
      v = ((longint'(l) * 16 * V8T[qp % 6][cls8(i, j)] <<< d) + 32) >>> 6;
    end else if (dc_kind == 1) begin
      v = ((longint'(l) * 16 * V4T[qp % 6][0] <<< d) + 32) >>> 6;
    end else if (dc_kind == 2) begin
      v = (longint'(l) * 16 * V4T[qp % 6][0] <<< d) >>> 5;
    end else begin
      v = longint'(l) * V4T[qp % 6][cls4(i, j)] <<< d;
    end
    return sat16(v);
  endfunction

  function automatic int norm_sub(int w, int s, bit is8, int i, int j);
    longint n;
    n = is8 ? N8T[cls8(i, j)] : N4T[cls4(i, j)];
    return sat16(longint'(w) - ((longint'(s) * n + 32) >>> 6));
  endfunction

  function automatic int clip255(int v);
    return v < 0 ? 0 : (v > 255 ? 255 : v);
  endfunction

  // ------------------------------------------------------ TraDED model
  typedef struct {
    int dc, v, h, d, dv, dh, ac, satd;
  } rit_t;

  function automatic int iabs(int v);
    return v < 0 ? -v : v;
  endfunction

  // edge intensities of an n x n transformed block (n = 4 or 8); t[i][j],
  // i = vertical frequency. 8x8 uses frequencies up to 5 only (V, H, D)
  // and up to 4 for DV and DH.
  function automatic rit_t rintens(input mat8_t t, input int n);
    rit_t r;
    int top, top4;
    r = '{default: 0};
    top  = (n == 4) ? 3 : 5;
    top4 = (n == 4) ? 3 : 4;   // 8x8 DV / DH sets stop at frequency 4
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++) begin
        int a;
        a = iabs(t[i][j]);
        r.satd += a;
        if (i == 0 && j == 0) r.dc = a;
        else begin
          r.ac += a;
          if (i <= top && j <= top) begin
            if (i == 0)      r.v += a;
            else if (j == 0) r.h += a;
            else if (i == j) r.d += a;
            else if (i < j)  begin if (j <= top4) r.dv += a; end
            else             begin if (i <= top4) r.dh += a; end
          end
        end
      end
    return r;
  endfunction

  // candidate modes of a 4x4 / 8x8 block (bit m = mode m enabled)
  function automatic bit [8:0] rdecide(input rit_t it, input int th_dom, input int th_off,
                                       input int mpm, input bit top, input bit left);
    bit [8:0] m;
    bit dc;
    int n;
    m = '0;
    dc = !(top && left) || !(it.dc < th_off * it.ac);
    if (it.dc > th_dom * it.ac) begin
      if (it.v >= it.h) m[0] = 1'b1; else m[1] = 1'b1;
    end else if (it.v >= it.h && it.v >= it.d && it.v > 2 * it.h) begin
      m[0] = 1'b1; m[5] = 1'b1; m[7] = 1'b1;
    end else if (it.h >= it.v && it.h >= it.d && it.h > 2 * it.v) begin
      m[1] = 1'b1; m[6] = 1'b1; m[8] = 1'b1;
    end else begin
      m[3] = 1'b1; m[4] = 1'b1;
      if (it.v + it.dv >= it.h + it.dh) begin m[5] = 1'b1; m[7] = 1'b1; end
      else begin m[6] = 1'b1; m[8] = 1'b1; end
    end
    n = $countones(m);
    if (n < 4) begin
      if (mpm == 2) dc = 1'b1;
      else if (mpm <= 8) m[mpm] = 1'b1;
    end
    if (!top)  begin m[0] = 0; m[3] = 0; m[7] = 0; end
    if (!left) begin m[1] = 0; m[8] = 0; end
    if (!(top && left)) begin m[4] = 0; m[5] = 0; m[6] = 0; end
    m[2] = dc;
    return m;
  endfunction

  // ------------------------------------------------ intra prediction model
  // Directional 4x4 / 8x8 prediction (n = 4 or 8) from the equations of
  // the standard. t[k+1] = top sample k (k = -1 is the corner, k up to
  // 2n-1), l[k+1] = left sample k (k = -1 is the corner, k up to n-1).
  function automatic int rp_t(input int t [17], input int k);
    return t[k + 1];
  endfunction
  function automatic int rp_l(input int l [9], input int k);
    return l[k + 1];
  endfunction
  function automatic int rpred(input int n, input int mode, input int x, input int y,
                               input int t [17], input int l [9]);
    int z;
    case (mode)
      0: return rp_t(t, x);
      1: return rp_l(l, y);
      3: begin
        if (x == n - 1 && y == n - 1) return (rp_t(t, 2*n-2) + 3 * rp_t(t, 2*n-1) + 2) >> 2;
        return (rp_t(t, x+y) + 2 * rp_t(t, x+y+1) + rp_t(t, x+y+2) + 2) >> 2;
      end
      4: begin
        if (x > y) return (rp_t(t, x-y-2) + 2 * rp_t(t, x-y-1) + rp_t(t, x-y) + 2) >> 2;
        if (x < y) return (rp_l(l, y-x-2) + 2 * rp_l(l, y-x-1) + rp_l(l, y-x) + 2) >> 2;
        return (rp_t(t, 0) + 2 * rp_t(t, -1) + rp_l(l, 0) + 2) >> 2;
      end
      5: begin
        z = 2 * x - y;
        if (z >= 0 && z % 2 == 0) return (rp_t(t, x-(y>>1)-1) + rp_t(t, x-(y>>1)) + 1) >> 1;
        if (z >= 0) return (rp_t(t, x-(y>>1)-2) + 2 * rp_t(t, x-(y>>1)-1) + rp_t(t, x-(y>>1)) + 2) >> 2;
        if (z == -1) return (rp_l(l, 0) + 2 * rp_l(l, -1) + rp_t(t, 0) + 2) >> 2;
        return (rp_l(l, y-2*x-1) + 2 * rp_l(l, y-2*x-2) + rp_l(l, y-2*x-3) + 2) >> 2;
      end
      6: begin
        z = 2 * y - x;
        if (z >= 0 && z % 2 == 0) return (rp_l(l, y-(x>>1)-1) + rp_l(l, y-(x>>1)) + 1) >> 1;
        if (z >= 0) return (rp_l(l, y-(x>>1)-2) + 2 * rp_l(l, y-(x>>1)-1) + rp_l(l, y-(x>>1)) + 2) >> 2;
        if (z == -1) return (rp_l(l, 0) + 2 * rp_l(l, -1) + rp_t(t, 0) + 2) >> 2;
        return (rp_t(t, x-2*y-1) + 2 * rp_t(t, x-2*y-2) + rp_t(t, x-2*y-3) + 2) >> 2;
      end
      7: begin
        if (y % 2 == 0) return (rp_t(t, x+(y>>1)) + rp_t(t, x+(y>>1)+1) + 1) >> 1;
        return (rp_t(t, x+(y>>1)) + 2 * rp_t(t, x+(y>>1)+1) + rp_t(t, x+(y>>1)+2) + 2) >> 2;
      end
      8: begin
        z = x + 2 * y;
        if (z < 2*n - 3 && z % 2 == 0) return (rp_l(l, y+(x>>1)) + rp_l(l, y+(x>>1)+1) + 1) >> 1;
        if (z < 2*n - 3) return (rp_l(l, y+(x>>1)) + 2 * rp_l(l, y+(x>>1)+1) + rp_l(l, y+(x>>1)+2) + 2) >> 2;
        if (z == 2*n - 3) return (rp_l(l, n-2) + 3 * rp_l(l, n-1) + 2) >> 2;
        return rp_l(l, n-1);
      end
      default: return 0;
    endcase
  endfunction

  // 8x8 reference-sample filtering; top[0..15], left[0..7], corner; the
  // top-right substitution (tr_ok = 0) is done by the caller. Only the
  // available sides are filtered.
  function automatic void rfilt8(input int top [16], input int left [8], input int corner,
                                 input bit tok, input bit lok, input bit cok,
                                 output int t [17], output int l [9]);
    int c;
    t = '{default: 0};
    l = '{default: 0};
    if (tok) begin
      t[1] = cok ? (corner + 2 * top[0] + top[1] + 2) >> 2 : (3 * top[0] + top[1] + 2) >> 2;
      for (int x = 1; x < 15; x++) t[x+1] = (top[x-1] + 2 * top[x] + top[x+1] + 2) >> 2;
      t[16] = (top[14] + 3 * top[15] + 2) >> 2;
    end
    if (lok) begin
      l[1] = cok ? (corner + 2 * left[0] + left[1] + 2) >> 2 : (3 * left[0] + left[1] + 2) >> 2;
      for (int y = 1; y < 7; y++) l[y+1] = (left[y-1] + 2 * left[y] + left[y+1] + 2) >> 2;
      l[8] = (left[6] + 3 * left[7] + 2) >> 2;
    end
    c = corner;
    if (cok) begin
      if (tok && lok) c = (top[0] + 2 * corner + left[0] + 2) >> 2;
      else if (tok)   c = (3 * corner + top[0] + 2) >> 2;
      else if (lok)   c = (3 * corner + left[0] + 2) >> 2;
    end
    t[0] = c;
    l[0] = c;
  endfunction
endpackage
