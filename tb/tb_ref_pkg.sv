// tb_ref_pkg: reference models used by the testbenches, written from the
// algorithm rather than from the RTL: Sobel gradients, ideal orientation
// quantisation (with the decision thresholds of the shift-and-add rotator
// and a guard band around them), bilinear filter taps and the complete 2x
// interpolation of a padded image.
package tb_ref_pkg;
  // Decision thresholds (degrees) of the rotator for the folded angle
  // 0..90: 45 - (atan(1/4)+2 atan(1/8)+atan(1/16)) etc.
  function automatic real deg(input real rad);
    return rad * 180.0 / 3.14159265358979;
  endfunction

  function automatic void thresholds(output real th[4]);
    real a2, a3, a4;
    a2 = deg($atan(0.25)); a3 = deg($atan(0.125)); a4 = deg($atan(0.0625));
    th[0] = 45.0 - (a2 + 2.0 * a3 + a4);
    th[1] = 45.0 - (a2 + a3 - a3 - a4);
    th[2] = 45.0 + (a2 + a3 - a3 - a4);
    th[3] = 45.0 + (a2 + 2.0 * a3 + a4);
  endfunction

  // Orientation code of atan(-fx/fy), modulo 180 degrees, in steps of 22.5.
  // amb is set when the angle lies within the guard band of a threshold.
  function automatic int angle_code(input int fx, input int fy, output bit amb);
    real x, y, t, th[4], guard;
    int  q;
    bit  neg;
    amb = 0;
    if (fx == 0 && fy == 0) return 0;
    x = real'(fy);
    y = real'(-fx);
    if (x < 0.0) begin x = -x; y = -y; end
    neg = (y < 0.0);
    t = deg($atan2(neg ? -y : y, x));
    thresholds(th);
    guard = ((fx * fx + fy * fy) < 256) ? 4.0 : 1.0;
    q = 0;
    for (int k = 0; k < 4; k++) begin
      if (t >= th[k]) q = k + 1;
      if (t > th[k] - guard && t < th[k] + guard) amb = 1;
    end
    if (neg) q = (8 - q) % 8;
    return q;
  endfunction

  function automatic int bilinear_tap(input int ph, input int t);
    int r, c;
    r = t / 4; c = t % 4;
    case (ph)
      0: return (r == 1 && (c == 1 || c == 2)) ? 256 : 0;
      1: return (c == 1 && (r == 1 || r == 2)) ? 256 : 0;
      default: return ((r == 1 || r == 2) && (c == 1 || c == 2)) ? 128 : 0;
    endcase
  endfunction

  function automatic int clampi(input int v, input int lo, input int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  // Apply a 16-tap filter (9 fraction bits) with rounding and clamping.
  function automatic int apply_filter(input int pix[16], input int cf[16]);
    int acc;
    acc = 0;
    for (int t = 0; t < 16; t++) acc += pix[t] * cf[t];
    acc = (acc + 256) >>> 9;
    return clampi(acc, 0, 255);
  endfunction

  // Coefficient sets used by the multi-stage testbenches: set k < 8,
  // phase p copies tap (5k+3+p) mod 16; set 8 is bilinear.
  function automatic int test_coef(input int s, input int p, input int t);
    if (s == 8) return bilinear_tap(p, t);
    return (t == (5 * s + 3 + p) % 16) ? 512 : 0;
  endfunction

  // Complete adaptive 2x luma model of a W x H image (row-major in src).
  // known[] marks source pixels whose value is certain; dst_known[] marks
  // output pixels that are certain (source known and, for interpolated
  // pixels, no orientation in the neighbourhood near a threshold).
  function automatic void luma_model(input int W, input int H, input bit oriented_sets,
                                     ref int src[], ref bit known[],
                                     ref int dst[], ref bit dst_known[]);
    int code[], gx, gy, cw, best, bestc, s, oy, ox;
    bit amb[], a, anyamb, allk;
    int h[8], px[16], cf[16];
    cw = W + 3;
    code = new[(H + 3) * cw];
    amb  = new[(H + 3) * cw];
    dst  = new[4 * W * H];
    dst_known = new[4 * W * H];
    for (int ci = -1; ci <= H + 1; ci++)
      for (int cj = -1; cj <= W + 1; cj++) begin
        int v[3][3]; bit k;
        k = 1;
        for (int di = 0; di < 3; di++)
          for (int dj = 0; dj < 3; dj++) begin
            int idx;
            idx = clampi(ci - 1 + di, 0, H - 1) * W + clampi(cj - 1 + dj, 0, W - 1);
            v[di][dj] = src[idx];
            k &= known[idx];
          end
        gx = (v[0][2] + 2*v[1][2] + v[2][2]) - (v[0][0] + 2*v[1][0] + v[2][0]);
        gy = (v[2][0] + 2*v[2][1] + v[2][2]) - (v[0][0] + 2*v[0][1] + v[0][2]);
        code[(ci+1)*cw + cj+1] = angle_code(gx, gy, a);
        amb[(ci+1)*cw + cj+1]  = a || !k;
      end
    for (int i = 0; i < H; i++)
      for (int j = 0; j < W; j++) begin
        for (int k = 0; k < 8; k++) h[k] = 0;
        anyamb = 0; allk = 1;
        for (int r = 0; r < 4; r++)
          for (int c = 0; c < 4; c++) begin
            int idx;
            idx = clampi(i - 1 + r, 0, H - 1) * W + clampi(j - 1 + c, 0, W - 1);
            h[code[(i+r)*cw + j+c]]++;
            anyamb |= amb[(i+r)*cw + j+c];
            px[4*r + c] = src[idx];
            allk &= known[idx];
          end
        best = 0; bestc = h[0];
        for (int k = 1; k < 8; k++) if (h[k] > bestc) begin best = k; bestc = h[k]; end
        s = (bestc > 6) ? best : 8;
        dst[(2*i)*(2*W) + 2*j] = src[i*W + j];
        dst_known[(2*i)*(2*W) + 2*j] = known[i*W + j];
        for (int p = 0; p < 3; p++) begin
          for (int t = 0; t < 16; t++) cf[t] = oriented_sets ? test_coef(s, p, t) : bilinear_tap(p, t);
          oy = 2*i + ((p == 0) ? 0 : 1);
          ox = 2*j + ((p == 1) ? 0 : 1);
          dst[oy*(2*W) + ox] = apply_filter(px, cf);
          dst_known[oy*(2*W) + ox] = allk && (!oriented_sets || !anyamb);
        end
      end
  endfunction

  // Bilinear 2x model of one chroma plane, last row/column replicated.
  function automatic void chroma_model(input int W, input int H, ref int src[], ref int dst[]);
    dst = new[4 * W * H];
    for (int i = 0; i < H; i++)
      for (int j = 0; j < W; j++) begin
        int p00, p01, p10, p11;
        p00 = src[i*W + j];
        p01 = src[i*W + clampi(j+1, 0, W-1)];
        p10 = src[clampi(i+1, 0, H-1)*W + j];
        p11 = src[clampi(i+1, 0, H-1)*W + clampi(j+1, 0, W-1)];
        dst[(2*i)*(2*W) + 2*j]     = p00;
        dst[(2*i)*(2*W) + 2*j+1]   = (p00 + p01 + 1) / 2;
        dst[(2*i+1)*(2*W) + 2*j]   = (p00 + p10 + 1) / 2;
        dst[(2*i+1)*(2*W) + 2*j+1] = (p00 + p01 + p10 + p11 + 2) / 4;
      end
  endfunction

  // Test picture: ramps at several angles in four quadrants, a noisy
  // patch in the middle.
  function automatic void test_image(input int W, input int H, input int seed, ref int img[]);
    img = new[W * H];
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int a, b, q, v;
        q = (y < H/2 ? 0 : 2) + (x < W/2 ? 0 : 1) + seed;
        q = q % 4;
        if (q == 0)      begin a = 3; b = 0; end
        else if (q == 1) begin a = 0; b = 3; end
        else if (q == 2) begin a = 1; b = 3; end
        else             begin a = 2; b = -2; end
        v = 128 + (a * (x - W/2) + b * (y - H/2)) % 100;
        if (x >= W/2 - W/8 && x < W/2 + W/8 && y >= H/2 - H/8 && y < H/2 + H/8) v = $urandom_range(255);
        img[y*W + x] = clampi(v, 0, 255);
      end
  endfunction
endpackage
