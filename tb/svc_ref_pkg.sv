// svc_ref_pkg: reference models used by the testbenches.
//
// Straight, table-driven forms of the SVC upsampling filters and of the
// H.264 Intra_4x4 prediction equations, written independently of the RTL
// (no folding, no shift-and-add), to compute expected values.
package svc_ref_pkg;

  // SVC luma 4-tap filter, taps e[-1], e[0], e[1], e[2] per phase
  localparam int LUMA_TAB [16][4] = '{
    '{ 0, 32,  0,  0}, '{-1, 32,  2, -1}, '{-2, 31,  4, -1}, '{-3, 30,  6, -1},
    '{-3, 28,  8, -1}, '{-4, 26, 11, -1}, '{-4, 24, 14, -2}, '{-3, 22, 16, -3},
    '{-3, 19, 19, -3}, '{-3, 16, 22, -3}, '{-2, 14, 24, -4}, '{-1, 11, 26, -4},
    '{-1,  8, 28, -3}, '{-1,  6, 30, -3}, '{-1,  4, 31, -2}, '{-1,  2, 32, -1}};

  // SVC chroma bilinear filter
  function automatic int chroma_tap(int phase, int k);
    if (k == 1) return 32 - 2 * phase;
    if (k == 2) return 2 * phase;
    return 0;
  endfunction

  function automatic int tap(bit chroma, int phase, int k);
    return chroma ? chroma_tap(phase, k) : LUMA_TAB[phase][k];
  endfunction

  function automatic int filt4(bit chroma, int phase, int a, int b, int c, int d);
    return tap(chroma, phase, 0) * a + tap(chroma, phase, 1) * b
         + tap(chroma, phase, 2) * c + tap(chroma, phase, 3) * d;
  endfunction

  function automatic int clip8(int v);
    return v < 0 ? 0 : (v > 255 ? 255 : v);
  endfunction

  // vertical pass rounding of the two-dimensional filter
  function automatic int vround(int s);
    return clip8((s + 512) >>> 10);
  endfunction

  function automatic int ext_ref(bit chroma, int a, int b, int c, int d);
    if (chroma) return (b + c + 1) >>> 1;
    return clip8((-3 * a + 19 * b + 19 * c - 3 * d + 16) >>> 5);
  endfunction

  // ---------------------------------------------------------------- Intra_4x4
  // p(x,y) with x,y in -1..7 (row -1 = top, column -1 = left)
  function automatic int i4_ref(int mode, int top[8], int left[4], int m,
                                bit ta, bit la, int x, int y);
    int zz;
    // neighbour fetch
    int P_t[-1:7];
    int P_l[-1:3];
    P_t[-1] = m;
    for (int i = 0; i < 8; i++) P_t[i] = top[i];
    P_l[-1] = m;
    for (int i = 0; i < 4; i++) P_l[i] = left[i];
    case (mode)
      0: return P_t[x];
      1: return P_l[y];
      2: begin
        int st, sl;
        st = P_t[0] + P_t[1] + P_t[2] + P_t[3];
        sl = P_l[0] + P_l[1] + P_l[2] + P_l[3];
        if (ta && la) return (st + sl + 4) >> 3;
        if (ta) return (st + 2) >> 2;
        if (la) return (sl + 2) >> 2;
        return 128;
      end
      3: if (x == 3 && y == 3) return (P_t[6] + 3 * P_t[7] + 2) >> 2;
         else return (P_t[x + y] + 2 * P_t[x + y + 1] + P_t[x + y + 2] + 2) >> 2;
      4: if (x > y) return (P_t[x - y - 2] + 2 * P_t[x - y - 1] + P_t[x - y] + 2) >> 2;
         else if (x < y) return (P_l[y - x - 2] + 2 * P_l[y - x - 1] + P_l[y - x] + 2) >> 2;
         else return (P_t[0] + 2 * m + P_l[0] + 2) >> 2;
      5: begin
        zz = 2 * x - y;
        if (zz >= 0 && zz % 2 == 0) return (P_t[x - (y >> 1) - 1] + P_t[x - (y >> 1)] + 1) >> 1;
        if (zz > 0) return (P_t[x - (y >> 1) - 2] + 2 * P_t[x - (y >> 1) - 1] + P_t[x - (y >> 1)] + 2) >> 2;
        if (zz == -1) return (P_l[0] + 2 * m + P_t[0] + 2) >> 2;
        return (P_l[y - 1] + 2 * P_l[y - 2] + P_l[y - 3] + 2) >> 2;
      end
      6: begin
        zz = 2 * y - x;
        if (zz >= 0 && zz % 2 == 0) return (P_l[y - (x >> 1) - 1] + P_l[y - (x >> 1)] + 1) >> 1;
        if (zz > 0) return (P_l[y - (x >> 1) - 2] + 2 * P_l[y - (x >> 1) - 1] + P_l[y - (x >> 1)] + 2) >> 2;
        if (zz == -1) return (P_l[0] + 2 * m + P_t[0] + 2) >> 2;
        return (P_t[x - 1] + 2 * P_t[x - 2] + P_t[x - 3] + 2) >> 2;
      end
      7: if (y % 2 == 0) return (P_t[x + (y >> 1)] + P_t[x + (y >> 1) + 1] + 1) >> 1;
         else return (P_t[x + (y >> 1)] + 2 * P_t[x + (y >> 1) + 1] + P_t[x + (y >> 1) + 2] + 2) >> 2;
      default: begin
        zz = x + 2 * y;
        if (zz == 0 || zz == 2 || zz == 4) return (P_l[y + (x >> 1)] + P_l[y + (x >> 1) + 1] + 1) >> 1;
        if (zz == 1 || zz == 3) return (P_l[y + (x >> 1)] + 2 * P_l[y + (x >> 1) + 1] + P_l[y + (x >> 1) + 2] + 2) >> 2;
        if (zz == 5) return (P_l[2] + 3 * P_l[3] + 2) >> 2;
        return P_l[3];
      end
    endcase
  endfunction

  // ---------------------------------------------------------------- Intra_8x8
  // Reference sample filtering then prediction, as in the H.264 equations.
  // t[0..15] = p[x,-1], l[0..7] = p[-1,y], m = p[-1,-1].
  function automatic int i8_ref(int mode, int t[16], int l[8], int m,
                                bit ta, bit la, bit ca, int x, int y);
    int ft[16], fl[8], fm, zz;
    int T[-1:15];
    int L[-1:7];
    // filtered top
    ft[0] = ca ? (m + 2 * t[0] + t[1] + 2) >> 2 : (3 * t[0] + t[1] + 2) >> 2;
    for (int i = 1; i < 15; i++) ft[i] = (t[i - 1] + 2 * t[i] + t[i + 1] + 2) >> 2;
    ft[15] = (t[14] + 3 * t[15] + 2) >> 2;
    // filtered left
    fl[0] = ca ? (m + 2 * l[0] + l[1] + 2) >> 2 : (3 * l[0] + l[1] + 2) >> 2;
    for (int i = 1; i < 7; i++) fl[i] = (l[i - 1] + 2 * l[i] + l[i + 1] + 2) >> 2;
    fl[7] = (l[6] + 3 * l[7] + 2) >> 2;
    // filtered corner
    if (ta && la) fm = (t[0] + 2 * m + l[0] + 2) >> 2;
    else if (ta)  fm = (3 * m + t[0] + 2) >> 2;
    else          fm = (3 * m + l[0] + 2) >> 2;
    T[-1] = fm; L[-1] = fm;
    for (int i = 0; i < 16; i++) T[i] = ft[i];
    for (int i = 0; i < 8; i++) L[i] = fl[i];
    case (mode)
      0: return T[x];
      1: return L[y];
      2: begin
        int st, sl;
        st = 0; sl = 0;
        for (int i = 0; i < 8; i++) begin st += T[i]; sl += L[i]; end
        if (ta && la) return (st + sl + 8) >> 4;
        if (ta) return (st + 4) >> 3;
        if (la) return (sl + 4) >> 3;
        return 128;
      end
      3: if (x == 7 && y == 7) return (T[14] + 3 * T[15] + 2) >> 2;
         else return (T[x + y] + 2 * T[x + y + 1] + T[x + y + 2] + 2) >> 2;
      4: if (x > y) return (T[x - y - 2] + 2 * T[x - y - 1] + T[x - y] + 2) >> 2;
         else if (x < y) return (L[y - x - 2] + 2 * L[y - x - 1] + L[y - x] + 2) >> 2;
         else return (T[0] + 2 * fm + L[0] + 2) >> 2;
      5: begin
        zz = 2 * x - y;
        if (zz >= 0 && zz % 2 == 0) return (T[x - (y >> 1) - 1] + T[x - (y >> 1)] + 1) >> 1;
        if (zz > 0) return (T[x - (y >> 1) - 2] + 2 * T[x - (y >> 1) - 1] + T[x - (y >> 1)] + 2) >> 2;
        if (zz == -1) return (L[0] + 2 * fm + T[0] + 2) >> 2;
        return (L[y - 2 * x - 1] + 2 * L[y - 2 * x - 2] + L[y - 2 * x - 3] + 2) >> 2;
      end
      6: begin
        zz = 2 * y - x;
        if (zz >= 0 && zz % 2 == 0) return (L[y - (x >> 1) - 1] + L[y - (x >> 1)] + 1) >> 1;
        if (zz > 0) return (L[y - (x >> 1) - 2] + 2 * L[y - (x >> 1) - 1] + L[y - (x >> 1)] + 2) >> 2;
        if (zz == -1) return (L[0] + 2 * fm + T[0] + 2) >> 2;
        return (T[x - 2 * y - 1] + 2 * T[x - 2 * y - 2] + T[x - 2 * y - 3] + 2) >> 2;
      end
      7: if (y % 2 == 0) return (T[x + (y >> 1)] + T[x + (y >> 1) + 1] + 1) >> 1;
         else return (T[x + (y >> 1)] + 2 * T[x + (y >> 1) + 1] + T[x + (y >> 1) + 2] + 2) >> 2;
      default: begin
        zz = x + 2 * y;
        if (zz < 13 && zz % 2 == 0) return (L[y + (x >> 1)] + L[y + (x >> 1) + 1] + 1) >> 1;
        if (zz < 13) return (L[y + (x >> 1)] + 2 * L[y + (x >> 1) + 1] + L[y + (x >> 1) + 2] + 2) >> 2;
        if (zz == 13) return (L[6] + 3 * L[7] + 2) >> 2;
        return L[7];
      end
    endcase
  endfunction

endpackage
