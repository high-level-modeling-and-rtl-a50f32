// Reference model of the edge-detection arithmetic, written directly from
// the operator definitions (full-precision integers), for the testbenches.
package edge_ref_pkg;

  // Gradient magnitude |Gx|+|Gy|. w[i][j]: i = row (0 upper), j = column.
  // centre = 2 for Sobel, 1 for Prewitt.
  function automatic int grad_mag(int w[3][3], int centre);
    int gx, gy;
    gx = 0; gy = 0;
    for (int k = 0; k < 3; k++) begin
      gx += (k == 1 ? centre : 1) * (w[k][2] - w[k][0]);
      gy += (k == 1 ? centre : 1) * (w[2][k] - w[0][k]);
    end
    if (gx < 0) gx = -gx;
    if (gy < 0) gy = -gy;
    return gx + gy;
  endfunction

  function automatic int binarize(int mag, int thr);
    return (mag > thr) ? 255 : 0;
  endfunction

  // Floor division by 2**sh, for negative numbers too.
  function automatic int floor_shift(int v, int sh);
    int d;
    d = 1 << sh;
    if (v >= 0) return v / d;
    return -((-v + d - 1) / d);
  endfunction

  function automatic int clamp255(int v);
    if (v < 0) return 0;
    if (v > 255) return 255;
    return v;
  endfunction

  // Synthetic test image: a horizontal grey ramp as background, a bright
  // disk in the middle ("ball"), a dark rectangle at the lower left, a
  // white one-pixel line, and a little pseudo-random noise. Gives soft
  // and hard edges of every direction and flat areas.
  function automatic int synth_pixel(int r, int c, int w, int h, int seed);
    int v, dr, dc, rad, n;
    v   = 30 + (c * 60) / w;
    dr  = r - h / 2;
    dc  = c - w / 2;
    rad = ((w < h) ? w : h) / 3;
    if (dr * dr + dc * dc <= rad * rad) v = 220 - (dr * dr + dc * dc) * 40 / (rad * rad + 1);
    if (r > (3 * h) / 4 && c < w / 4) v = 5;
    if (r == h / 5) v = 255;
    n = ((r * 7919 + c * 104729 + seed * 31337) ^ (r * c)) & 32'h7fff;
    v += (n % 9) - 4;
    if (v < 0) v = 0;
    if (v > 255) v = 255;
    return v;
  endfunction

endpackage
