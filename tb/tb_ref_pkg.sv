// tb_ref_pkg: reference models used by the testbenches.
//
// Plain integer models of every SCP operation, written directly from the
// operation definitions (not from the RTL): images are queues of int in
// raster order. Function codes are the numeric codes of the stream format.
package tb_ref_pkg;

  typedef int img_t [$];

  function automatic int clamp8(int v);
    return (v < 0) ? 0 : (v > 255) ? 255 : v;
  endfunction

  // point function codes: 0 add 1 sub 2 mul 3 absdiff 4 and 5 or 6 xor
  // 7 min 8 max 9 gt 10 ge 11 lt 12 le 13 eq 14 ne
  function automatic int ref_point(int op, int a, int b, int vt, int vf);
    case (op)
      0: return clamp8(a + b);
      1: return clamp8(a - b);
      2: return clamp8(a * b);
      3: return (a > b) ? a - b : b - a;
      4: return a & b;
      5: return a | b;
      6: return a ^ b;
      7: return (a < b) ? a : b;
      8: return (a > b) ? a : b;
      9: return (a > b) ? vt : vf;
      10: return (a >= b) ? vt : vf;
      11: return (a < b) ? vt : vf;
      12: return (a <= b) ? vt : vf;
      13: return (a == b) ? vt : vf;
      14: return (a != b) ? vt : vf;
      default: return 0;
    endcase
  endfunction

  // pairwise: 0 mul 1 add 2 sub 3 and 4 or (weights are signed 8-bit)
  function automatic int ref_pair(int op, int p, int w);
    case (op)
      0: return p * w;
      1: return p + w;
      2: return p - w;
      3: return p & (w & 255);
      4: return p | (w & 255);
      default: return 0;
    endcase
  endfunction

  // reduction: 0 sum 1 |sum| 2 max 3 min 4 and 5 or
  function automatic int ref_reduce(int op, int v [9]);
    int r;
    r = v[0];
    for (int i = 1; i < 9; i++)
      case (op)
        0, 1: r += v[i];
        2: if (v[i] > r) r = v[i];
        3: if (v[i] < r) r = v[i];
        4: r &= v[i];
        5: r |= v[i];
        default: ;
      endcase
    if (op == 1 && r < 0) r = -r;
    return r;
  endfunction

  function automatic int ref_comb(int op, int a, int b);
    case (op)
      0, 1: return a + b;
      2: return (a > b) ? a : b;
      3: return (a < b) ? a : b;
      4: return a & b;
      5: return a | b;
      default: return a;
    endcase
  endfunction

  // window value at (x+dx, y+dy), dx,dy in 0..2, top-left origin (x,y)
  function automatic int px(const ref img_t img, input int w, int x, int y);
    return img[y * w + x];
  endfunction

  function automatic img_t ref_neigh(const ref img_t img, input int w, int h, int k [9],
                                     int pop, int rop, int sx, int sy);
    img_t o;
    int v [9];
    for (int y = 0; y + 2 < h; y += sy)
      for (int x = 0; x + 2 < w; x += sx) begin
        for (int i = 0; i < 9; i++) v[i] = ref_pair(pop, px(img, w, x + i % 3, y + i / 3), k[i]);
        o.push_back(clamp8(ref_reduce(rop, v)));
      end
    return o;
  endfunction

  // rotate a 3x3 kernel by 90 degrees clockwise
  function automatic void rot90(ref int k [9]);
    int t [9];
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++) t[c * 3 + (2 - r)] = k[r * 3 + c];
    k = t;
  endfunction

  // rotate by 45 degrees clockwise: outer ring moves one place
  function automatic void rot45(ref int k [9]);
    int ring [8] = '{0, 1, 2, 5, 8, 7, 6, 3};
    int t [9];
    t = k;
    for (int i = 0; i < 8; i++) t[ring[(i + 1) % 8]] = k[ring[i]];
    k = t;
  endfunction

  function automatic img_t ref_cneigh(const ref img_t img, input int w, int h, int k0 [9],
                                      int pop, int rop, int nrot, int step45, int fop);
    img_t o;
    int v [9];
    int k [9];
    int acc, part;
    for (int y = 0; y + 2 < h; y++)
      for (int x = 0; x + 2 < w; x++) begin
        k = k0;
        for (int r = 0; r < nrot; r++) begin
          for (int i = 0; i < 9; i++) v[i] = ref_pair(pop, px(img, w, x + i % 3, y + i / 3), k[i]);
          part = ref_reduce(rop, v);
          acc = (r == 0) ? part : ref_comb(fop, acc, part);
          for (int s = 0; s < step45; s++) rot45(k);
        end
        o.push_back(clamp8(acc));
      end
    return o;
  endfunction

  function automatic img_t ref_sobel(const ref img_t img, input int w, int h, int thr);
    img_t o;
    int gx, gy, a [3][3];
    for (int y = 0; y + 2 < h; y++)
      for (int x = 0; x + 2 < w; x++) begin
        for (int r = 0; r < 3; r++)
          for (int c = 0; c < 3; c++) a[r][c] = px(img, w, x + c, y + r);
        gx = (a[0][2] + 2 * a[1][2] + a[2][2]) - (a[0][0] + 2 * a[1][0] + a[2][0]);
        gy = (a[2][0] + 2 * a[2][1] + a[2][2]) - (a[0][0] + 2 * a[0][1] + a[0][2]);
        if (gx < 0) gx = -gx;
        if (gy < 0) gy = -gy;
        o.push_back((gx + gy >= thr) ? 255 : 0);
      end
    return o;
  endfunction

  // Otsu threshold by the textbook floating-point definition: maximise
  // w0*w1*(mu0-mu1)^2 over t, class 0 = grey levels <= t, first maximum.
  function automatic int ref_otsu_t(const ref img_t img);
    real hist [256];
    real n, w0, w1, s0, st, best, var_b;
    int bt;
    foreach (hist[i]) hist[i] = 0.0;
    st = 0.0;
    foreach (img[i]) begin
      hist[img[i]] += 1.0;
      st += img[i];
    end
    n = img.size();
    w0 = 0.0;
    s0 = 0.0;
    best = -1.0;
    bt = 0;
    for (int t = 0; t < 256; t++) begin
      w0 += hist[t];
      s0 += t * hist[t];
      w1 = n - w0;
      if (w0 > 0.0 && w1 > 0.0) begin
        var_b = w0 * w1 * ((s0 / w0) - ((st - s0) / w1)) ** 2;
        if (var_b > best * (1.0 + 1e-12)) begin
          best = var_b;
          bt = t;
        end
      end
    end
    return bt;
  endfunction

  function automatic img_t rand_img(int n, int mode);
    img_t o;
    for (int i = 0; i < n; i++)
      case (mode)
        0: o.push_back(int'($urandom % 256));
        1: o.push_back(($urandom % 4 == 0) ? 255 : 0);              // binary
        default: o.push_back((($urandom % 2) != 0) ? 40 + int'($urandom % 30)
                                            : 170 + int'($urandom % 40)); // bimodal
      endcase
    return o;
  endfunction

endpackage
