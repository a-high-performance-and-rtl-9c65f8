// mc_ref_pkg: reference models used by the testbenches.
//
// A synthetic reference picture (a fixed pseudo-random function of picture
// slot and coordinates, clamped at the edges like a padded picture), and
// straightforward per-pixel models of H.264 and AVS luma interpolation, the
// bilinear interpolator and weighted prediction. The models
// compute every sample from integer pixels directly, with none of the
// datapath's sharing, delays or register bank.
package mc_ref_pkg;

  function automatic int clip(input int v);
    return (v < 0) ? 0 : (v > 255) ? 255 : v;
  endfunction

  // pixel of picture slot pic at (x, y), edges replicated
  function automatic int pix(input int pic, input int x, input int y, input int w, input int h);
    int xc, yc, v;
    xc = (x < 0) ? 0 : (x > w - 1) ? w - 1 : x;
    yc = (y < 0) ? 0 : (y > h - 1) ? h - 1 : y;
    v  = (xc * 37 + yc * 91 + pic * 53 + ((xc * yc) >> 2) + ((xc ^ (yc * 5)) * 11)) & 255;
    return v;
  endfunction

  // ---------------- H.264 ----------------
  function automatic int t6(input int k);
    case (k)
      0: return 1; 1: return -5; 2: return 20; 3: return 20; 4: return -5; default: return 1;
    endcase
  endfunction

  function automatic int h264_b1(input int pic, input int x, input int y, input int w, input int h);
    int s = 0;
    for (int k = 0; k < 6; k++) s += t6(k) * pix(pic, x - 2 + k, y, w, h);
    return s;
  endfunction
  function automatic int h264_h1(input int pic, input int x, input int y, input int w, input int h);
    int s = 0;
    for (int k = 0; k < 6; k++) s += t6(k) * pix(pic, x, y - 2 + k, w, h);
    return s;
  endfunction
  function automatic int h264_j(input int pic, input int x, input int y, input int w, input int h);
    int s = 0;
    for (int k = 0; k < 6; k++) s += t6(k) * h264_h1(pic, x - 2 + k, y, w, h);
    return clip((s + 512) >>> 10);
  endfunction

  function automatic int h264_luma(input int pic, input int x, input int y, input int fx, input int fy,
                                   input int w, input int h);
    int G, G1, Gx1, b, hh, j, s, m;
    G   = pix(pic, x, y, w, h);
    Gx1 = pix(pic, x + 1, y, w, h);
    G1  = pix(pic, x, y + 1, w, h);
    b   = clip((h264_b1(pic, x, y, w, h) + 16) >>> 5);
    hh  = clip((h264_h1(pic, x, y, w, h) + 16) >>> 5);
    s   = clip((h264_b1(pic, x, y + 1, w, h) + 16) >>> 5);
    m   = clip((h264_h1(pic, x + 1, y, w, h) + 16) >>> 5);
    j   = h264_j(pic, x, y, w, h);
    case (fy * 4 + fx)
      0:  return G;
      1:  return (G + b + 1) >> 1;      // a
      2:  return b;
      3:  return (Gx1 + b + 1) >> 1;    // c
      4:  return (G + hh + 1) >> 1;     // d
      5:  return (b + hh + 1) >> 1;     // e
      6:  return (b + j + 1) >> 1;      // f
      7:  return (b + m + 1) >> 1;      // g
      8:  return hh;
      9:  return (hh + j + 1) >> 1;     // i
      10: return j;
      11: return (j + m + 1) >> 1;      // k
      12: return (G1 + hh + 1) >> 1;    // n
      13: return (hh + s + 1) >> 1;     // p
      14: return (j + s + 1) >> 1;      // q
      default: return (m + s + 1) >> 1; // r
    endcase
  endfunction

  // ---------------- AVS ----------------
  function automatic int avs_b1(input int pic, input int x, input int y, input int w, input int h);
    return -pix(pic, x - 1, y, w, h) + 5 * pix(pic, x, y, w, h) + 5 * pix(pic, x + 1, y, w, h)
           - pix(pic, x + 2, y, w, h);
  endfunction
  function automatic int avs_h1(input int pic, input int x, input int y, input int w, input int h);
    return -pix(pic, x, y - 1, w, h) + 5 * pix(pic, x, y, w, h) + 5 * pix(pic, x, y + 1, w, h)
           - pix(pic, x, y + 2, w, h);
  endfunction
  function automatic int avs_b(input int pic, input int x, input int y, input int w, input int h);
    return clip((avs_b1(pic, x, y, w, h) + 4) >>> 3);
  endfunction
  function automatic int avs_h(input int pic, input int x, input int y, input int w, input int h);
    return clip((avs_h1(pic, x, y, w, h) + 4) >>> 3);
  endfunction
  function automatic int avs_j(input int pic, input int x, input int y, input int w, input int h);
    int s;
    s = -avs_h1(pic, x - 1, y, w, h) + 5 * avs_h1(pic, x, y, w, h) + 5 * avs_h1(pic, x + 1, y, w, h)
        - avs_h1(pic, x + 2, y, w, h);
    return clip((s + 32) >>> 6);
  endfunction
  function automatic int q4(input int p0, input int p1, input int p2, input int p3);
    return (p0 + 7 * p1 + 7 * p2 + p3 + 8) >> 4;
  endfunction

  function automatic int avs_luma(input int pic, input int x, input int y, input int fx, input int fy,
                                  input int w, input int h);
    int G, Gx1, G1, G11;
    G   = pix(pic, x, y, w, h);
    Gx1 = pix(pic, x + 1, y, w, h);
    G1  = pix(pic, x, y + 1, w, h);
    G11 = pix(pic, x + 1, y + 1, w, h);
    case (fy * 4 + fx)
      0:  return G;
      1:  return q4(avs_b(pic, x - 1, y, w, h), G, avs_b(pic, x, y, w, h), Gx1);
      2:  return avs_b(pic, x, y, w, h);
      3:  return q4(G, avs_b(pic, x, y, w, h), Gx1, avs_b(pic, x + 1, y, w, h));
      4:  return q4(avs_h(pic, x, y - 1, w, h), G, avs_h(pic, x, y, w, h), G1);
      5:  return (G + avs_j(pic, x, y, w, h) + 1) >> 1;
      6:  return q4(avs_j(pic, x, y - 1, w, h), avs_b(pic, x, y, w, h), avs_j(pic, x, y, w, h),
                    avs_b(pic, x, y + 1, w, h));
      7:  return (Gx1 + avs_j(pic, x, y, w, h) + 1) >> 1;
      8:  return avs_h(pic, x, y, w, h);
      9:  return q4(avs_j(pic, x - 1, y, w, h), avs_h(pic, x, y, w, h), avs_j(pic, x, y, w, h),
                    avs_h(pic, x + 1, y, w, h));
      10: return avs_j(pic, x, y, w, h);
      11: return q4(avs_h(pic, x, y, w, h), avs_j(pic, x, y, w, h), avs_h(pic, x + 1, y, w, h),
                    avs_j(pic, x + 1, y, w, h));
      12: return q4(G, avs_h(pic, x, y, w, h), G1, avs_h(pic, x, y + 1, w, h));
      13: return (G1 + avs_j(pic, x, y, w, h) + 1) >> 1;
      14: return q4(avs_b(pic, x, y, w, h), avs_j(pic, x, y, w, h), avs_b(pic, x, y + 1, w, h),
                    avs_j(pic, x, y + 1, w, h));
      default: return (G11 + avs_j(pic, x, y, w, h) + 1) >> 1;
    endcase
  endfunction

  // ---------------- bilinear ----------------
  function automatic int bilinear(input int pic, input int x, input int y, input int dx, input int dy,
                                  input int w, input int h);
    return ((8 - dx) * (8 - dy) * pix(pic, x, y, w, h) + dx * (8 - dy) * pix(pic, x + 1, y, w, h)
            + (8 - dx) * dy * pix(pic, x, y + 1, w, h) + dx * dy * pix(pic, x + 1, y + 1, w, h) + 32) >> 6;
  endfunction

  // ---------------- weighted prediction ----------------
  function automatic int wp_as(input int x, input bit avs, input int ao);
    return avs ? clip(((x + 16) >>> 5) + ao) : x;
  endfunction
  function automatic int wp(input int p0, input int p1, input bit bi, input bit bwd_only, input bit avs,
                            input int w0, input int w1, input int o, input int n, input int ao);
    int s, r;
    if (bi)            s = wp_as(p0 * w0, avs, ao) + wp_as(p1 * w1, avs, ao);
    else if (bwd_only) s = wp_as(p1 * w1, avs, ao);
    else               s = wp_as(p0 * w0, avs, ao);
    r = (n == 0) ? 0 : (1 << (n - 1));
    return clip(((s + r) >>> n) + o);
  endfunction

endpackage
