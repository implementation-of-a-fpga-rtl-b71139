// canny_ref_pkg: reference models for the Canny testbenches, written on whole frames held in
// integer arrays (index r*w + c), independently of the streaming hardware. Out-of-frame
// neighbours take the nearest pixel inside the frame.
package canny_ref_pkg;

  typedef int frame_t[];

  function automatic int clampi(int v, int lo, int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  // index of the nearest in-frame pixel to (r, c)
  function automatic int at(int w, int h, int r, int c);
    return clampi(r, 0, h - 1) * w + clampi(c, 0, w - 1);
  endfunction

  // 5x5 Gaussian; kernel 0 is sigma 1.4 with >>7, kernel 1 is sigma 1.0 with >>8; saturates.
  function automatic void gauss(input frame_t img, input int w, h, kernel, output frame_t res);
    int m14[5][5] = '{'{2,4,5,4,2}, '{4,9,12,9,4}, '{5,12,15,12,5}, '{4,9,12,9,4}, '{2,4,5,4,2}};
    int m10[5][5] = '{'{1,4,7,4,1}, '{4,16,26,16,4}, '{7,26,41,26,7}, '{4,16,26,16,4}, '{1,4,7,4,1}};
    res = new[w * h];
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) begin
        int s = 0;
        for (int dy = -2; dy <= 2; dy++)
          for (int dx = -2; dx <= 2; dx++)
            s += (kernel == 0 ? m14[dy+2][dx+2] : m10[dy+2][dx+2]) * img[at(w, h, r + dy, c + dx)];
        s = s / (kernel == 0 ? 128 : 256);
        res[r * w + c] = (s > 255) ? 255 : s;
      end
  endfunction

  // Sobel components: gx = left - right, gy = below - above, each with weights 1 2 1.
  function automatic void sobel(input frame_t img, input int w, h, output frame_t gx, gy);
    gx = new[w * h];
    gy = new[w * h];
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) begin
        gx[r*w+c] = 0;
        gy[r*w+c] = 0;
        for (int d = -1; d <= 1; d++) begin
          int wt = (d == 0) ? 2 : 1;
          gx[r*w+c] += wt * (img[at(w, h, r + d, c - 1)] - img[at(w, h, r + d, c + 1)]);
          gy[r*w+c] += wt * (img[at(w, h, r + 1, c + d)] - img[at(w, h, r - 1, c + d)]);
        end
      end
  endfunction

  function automatic int iabs(int v);
    return (v < 0) ? -v : v;
  endfunction

  // Sector check by angle: true if the direction of (gx, gy) (y up) lies in the closed
  // 45-degree interval of sector s. A zero vector fits any sector.
  function automatic bit sector_ok(int gx, int gy, int s);
    real pi = 3.14159265358979;
    real a;
    if (gx == 0 && gy == 0) return 1'b1;
    a = $atan2(real'(gy), real'(gx)) * 180.0 / pi;
    if (a < 0.0) a += 360.0;
    if (s == 0 && a > 359.999999) return 1'b1;
    return (a >= 45.0 * s - 1e-6) && (a <= 45.0 * (s + 1) + 1e-6);
  endfunction

  // Magnitude at the point where the ray (vx, vy) (y up) leaves the centre cell, times
  // max(|vx|, |vy|): linear interpolation between the axial and the diagonal neighbour.
  function automatic longint ray(const ref frame_t mag, input int w, h, r, c, vx, vy);
    int ax = iabs(vx), ay = iabs(vy);
    int sx = (vx < 0) ? -1 : 1, sy = (vy < 0) ? -1 : 1;
    int D = (ax >= ay) ? ax : ay, d = (ax >= ay) ? ay : ax;
    int axial, diag;
    diag = mag[at(w, h, r - sy, c + sx)];
    if (ax >= ay) axial = mag[at(w, h, r, c + sx)];
    else          axial = mag[at(w, h, r - sy, c)];
    return longint'(D - d) * axial + longint'(d) * diag;
  endfunction

  // Non-maximum suppression. The side whose ray points upwards (or, for a horizontal
  // gradient, along +gx) must be beaten strictly, the other side at least matched.
  function automatic void nms(input frame_t gx, gy, input int w, h, output frame_t res);
    int mag[];
    mag = new[w * h];
    res = new[w * h];
    foreach (mag[i]) mag[i] = iabs(gx[i]) + iabs(gy[i]);
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) begin
        int i = r * w + c;
        int s = (gy[i] >= 0) ? 1 : -1;
        int vx = s * gx[i], vy = s * gy[i];
        longint D = (iabs(vx) >= iabs(vy)) ? iabs(vx) : iabs(vy);
        longint g = longint'(mag[i]) * D;
        bit keep = (g > ray(mag, w, h, r, c, vx, vy)) && (g >= ray(mag, w, h, r, c, -vx, -vy));
        res[i] = keep ? mag[i] : 0;
      end
  endfunction

  // Hysteresis in one raster pass: strong (> hi) is an edge; weak (> lo) is an edge if an
  // 8-neighbour is strong or an earlier-decided neighbour (UL, U, UR, L) is an edge.
  // promoted_chain counts weak pixels joined only through an earlier decision.
  function automatic void hyst(input frame_t m, input int w, h, lo, hi, output frame_t res,
                               output int n_strong, output int n_weak_in, output int n_weak_out,
                               output int promoted_chain);
    res = new[w * h];
    n_strong = 0; n_weak_in = 0; n_weak_out = 0; promoted_chain = 0;
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) begin
        int v = m[r*w+c];
        bit e;
        if (v > hi) begin
          e = 1; n_strong++;
        end else if (v > lo) begin
          bit sn = 0, dn = 0;
          for (int dy = -1; dy <= 1; dy++)
            for (int dx = -1; dx <= 1; dx++)
              if ((dy != 0 || dx != 0) && r + dy >= 0 && r + dy < h && c + dx >= 0 && c + dx < w)
                if (m[(r+dy)*w + c+dx] > hi) sn = 1;
          if (r > 0 && c > 0     && res[(r-1)*w + c-1] != 0) dn = 1;
          if (r > 0              && res[(r-1)*w + c]   != 0) dn = 1;
          if (r > 0 && c < w - 1 && res[(r-1)*w + c+1] != 0) dn = 1;
          if (c > 0              && res[r*w + c-1]     != 0) dn = 1;
          e = sn || dn;
          if (e) n_weak_in++; else n_weak_out++;
          if (dn && !sn) promoted_chain++;
        end else e = 0;
        res[r*w+c] = e ? 255 : 0;
      end
  endfunction

endpackage
