// intra_ref_pkg: reference model used by the testbenches.
//
// Written straight from the H.264/AVC intra prediction equations, pixel by
// pixel, and with a matrix-product Hadamard transform, so that it shares no
// structure with the tap-index, butterfly and PE datapath of the RTL. All
// neighbours are taken as available except the upper-right pixels the caller
// marks unavailable (they are then replaced by D).
package intra_ref_pkg;

  typedef int blk4_t [4][4];

  // 4x4 prediction. t[0..7] = A..H, lf[0..3] = I..L, m = corner M.
  function automatic int ref_i4(input int mode, input int t[8], input int lf[4], input int m,
                                input int x, input int y);
    int z;
    case (mode)
      0: return t[x];
      1: return lf[y];
      2: return (t[0] + t[1] + t[2] + t[3] + lf[0] + lf[1] + lf[2] + lf[3] + 4) / 8;
      3: begin
        if (x == 3 && y == 3) return (t[6] + 3 * t[7] + 2) / 4;
        return (t[x + y] + 2 * t[x + y + 1] + t[x + y + 2] + 2) / 4;
      end
      4: begin
        if (x > y) return ((x - y - 2 < 0 ? m : t[x - y - 2]) + 2 * t[x - y - 1] + t[x - y] + 2) / 4;
        if (x < y) return ((y - x - 2 < 0 ? m : lf[y - x - 2]) + 2 * lf[y - x - 1] + lf[y - x] + 2) / 4;
        return (t[0] + 2 * m + lf[0] + 2) / 4;
      end
      5: begin
        z = 2 * x - y;
        if (z >= 0 && z % 2 == 0)
          return (((x - y / 2 - 1) < 0 ? m : t[x - y / 2 - 1]) + t[x - y / 2] + 1) / 2;
        if (z > 0)
          return (((x - y / 2 - 2) < 0 ? m : t[x - y / 2 - 2]) + 2 * ((x - y / 2 - 1) < 0 ? m : t[x - y / 2 - 1]) + t[x - y / 2] + 2) / 4;
        if (z == -1) return (lf[0] + 2 * m + t[0] + 2) / 4;
        return (lf[y - 1] + 2 * lf[y - 2] + ((y - 3) < 0 ? m : lf[y - 3]) + 2) / 4;
      end
      6: begin
        z = 2 * y - x;
        if (z >= 0 && z % 2 == 0)
          return (((y - x / 2 - 1) < 0 ? m : lf[y - x / 2 - 1]) + lf[y - x / 2] + 1) / 2;
        if (z > 0)
          return (((y - x / 2 - 2) < 0 ? m : lf[y - x / 2 - 2]) + 2 * ((y - x / 2 - 1) < 0 ? m : lf[y - x / 2 - 1]) + lf[y - x / 2] + 2) / 4;
        if (z == -1) return (lf[0] + 2 * m + t[0] + 2) / 4;
        return (t[x - 1] + 2 * t[x - 2] + ((x - 3) < 0 ? m : t[x - 3]) + 2) / 4;
      end
      7: begin
        if (y % 2 == 0) return (t[x + y / 2] + t[x + y / 2 + 1] + 1) / 2;
        return (t[x + y / 2] + 2 * t[x + y / 2 + 1] + t[x + y / 2 + 2] + 2) / 4;
      end
      default: begin
        z = x + 2 * y;
        if (z > 5) return lf[3];
        if (z == 5) return (lf[2] + 3 * lf[3] + 2) / 4;
        if (z % 2 == 0) return (lf[y + x / 2] + lf[y + x / 2 + 1] + 1) / 2;
        return (lf[y + x / 2] + 2 * lf[y + x / 2 + 1] + lf[y + x / 2 + 2] + 2) / 4;
      end
    endcase
  endfunction

  // Plane constants of a 16x16 block: H, V, a, b, c, and the DC value.
  function automatic void ref_i16_consts(input int top[16], input int left[16], input int m,
                                         output int a, output int b, output int c, output int dc);
    int h, v, s;
    h = 0; v = 0; s = 0;
    for (int k = 1; k <= 8; k++) begin
      h += k * (top[7 + k] - (7 - k < 0 ? m : top[7 - k]));
      v += k * (left[7 + k] - (7 - k < 0 ? m : left[7 - k]));
    end
    for (int k = 0; k < 16; k++) s += top[k] + left[k];
    a = 16 * (left[15] + top[15]);
    b = (5 * h + 32) >>> 6;
    c = (5 * v + 32) >>> 6;
    dc = (s + 16) / 32;
  endfunction

  function automatic int clip255(input int v);
    return v < 0 ? 0 : (v > 255 ? 255 : v);
  endfunction

  // 16x16 prediction of pixel (x, y), 0 <= x, y < 16.
  function automatic int ref_i16(input int mode, input int top[16], input int left[16], input int m,
                                 input int x, input int y);
    int a, b, c, dc;
    ref_i16_consts(top, left, m, a, b, c, dc);
    case (mode)
      0: return top[x];
      1: return left[y];
      2: return dc;
      default: return clip255((a + b * (x - 7) + c * (y - 7) + 16) >>> 5);
    endcase
  endfunction

  // Hadamard transform H * d * H with H the 4x4 Hadamard matrix.
  function automatic blk4_t hadamard(input blk4_t d);
    int hm [4][4];
    blk4_t tmp, r;
    hm = '{'{1, 1, 1, 1}, '{1, 1, -1, -1}, '{1, -1, -1, 1}, '{1, -1, 1, -1}};
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        tmp[i][j] = 0;
        for (int k = 0; k < 4; k++) tmp[i][j] += hm[i][k] * d[k][j];
      end
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        r[i][j] = 0;
        for (int k = 0; k < 4; k++) r[i][j] += tmp[i][k] * hm[j][k];
      end
    return r;
  endfunction

  function automatic int iabs(input int v);
    return v < 0 ? -v : v;
  endfunction

  // Sum of absolute Hadamard coefficients; dc gets coefficient (0,0).
  function automatic int had_sum(input blk4_t d, output int dc);
    blk4_t r;
    int s;
    r = hadamard(d);
    s = 0;
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) s += iabs(r[i][j]);
    dc = r[0][0];
    return s;
  endfunction

endpackage
