// tb_ref_pkg: software reference of the pixel pipeline, written independently
// of the RTL, plus scene generators. Images are flat arrays, index r*w + c.
//   restore_ref : 3x3 kernel, centre 2, neighbours -1/8, rounded to nearest
//                 (halves up), clamped 0..255; border pixels and disabled
//                 filter pass the pixel unchanged.
//   feature_ref : minimum eigenvalue of Z (gradients from the four 2x2 cells
//                 of the 3x3 window, Z = sums / 16) compared with T, computed
//                 in real arithmetic with the closed-form eigenvalue; border
//                 pixels are never features.
package tb_ref_pkg;

  typedef byte unsigned img_t[];
  typedef bit           flags_t[];

  function automatic bit is_border(int r, int c, int w, int h);
    return (r < 1) || (c < 1) || (r > h - 2) || (c > w - 2);
  endfunction

  function automatic img_t restore_ref(input img_t src, input int w, int h, bit en);
    img_t dst = new[w*h];
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) begin
        if (!en || is_border(r, c, w, h)) dst[r*w+c] = src[r*w+c];
        else begin
          real v;
          int  q, p;
          p = src[r*w + c];
          v = 2.0 * p;
          for (int dr = -1; dr <= 1; dr++)
            for (int dc = -1; dc <= 1; dc++)
              if (dr != 0 || dc != 0) begin
                p = src[(r+dr)*w + (c+dc)];
                v -= 0.125 * p;
              end
          q = int'($floor(v + 0.5));
          if (q < 0) q = 0;
          if (q > 255) q = 255;
          dst[r*w+c] = byte'(q);
        end
      end
    return dst;
  endfunction

  // Minimum eigenvalue of Z for a 3x3 window p[row][col], real arithmetic.
  function automatic real lambda_min(int p[3][3]);
    real zxx, zxy, zyy, tr, det;
    zxx = 0; zxy = 0; zyy = 0;
    for (int a = 0; a < 2; a++)
      for (int b = 0; b < 2; b++) begin
        real gx, gy;
        // 2x2 cell with top-left corner (a, b); half-differences
        gx = 0.5 * ((p[a][b+1] + p[a+1][b+1]) - (p[a][b] + p[a+1][b]));
        gy = 0.5 * ((p[a+1][b] + p[a+1][b+1]) - (p[a][b] + p[a][b+1]));
        zxx += gx*gx / 4.0; zxy += gx*gy / 4.0; zyy += gy*gy / 4.0;
      end
    tr  = (zxx + zyy) / 2.0;
    det = ((zxx - zyy) / 2.0) ** 2 + zxy*zxy;
    return tr - $sqrt(det);
  endfunction

  function automatic flags_t feature_ref(input img_t im, input int w, int h, int thresh);
    flags_t f = new[w*h];
    int     p[3][3];
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) begin
        f[r*w+c] = 1'b0;
        if (!is_border(r, c, w, h)) begin
          for (int i = 0; i < 3; i++)
            for (int j = 0; j < 3; j++) p[i][j] = im[(r-1+i)*w + (c-1+j)];
          f[r*w+c] = lambda_min(p) > real'(thresh) + 1e-9;
        end
      end
    return f;
  endfunction

  function automatic int count_flags(input flags_t f);
    int n = 0;
    foreach (f[i]) n += f[i];
    return n;
  endfunction

  // Scene: smooth background with a textured object (random blocks) lit by
  // `gain` (percent) and optionally blurred by a 3x3 box filter (defocus).
  function automatic img_t make_scene(int w, int h, int seed, int gain, bit blur);
    img_t im = new[w*h];
    img_t tmp;
    int   s = seed;
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) begin
        int v;
        v = 60 + (r + c) / 4;
        if (r >= h/4 && r < 3*h/4 && c >= w/4 && c < 3*w/4) begin
          int br, bc;
          br = r / 3; bc = c / 3;
          v = 40 + ((br * 131 + bc * 71 + seed * 17) * 2654435761 >> 8) % 160;
        end
        s = s * 1103515245 + 12345;
        v = v + ((s >> 16) & 7) - 3;
        v = v * gain / 100;
        if (v < 0) v = 0;
        if (v > 255) v = 255;
        im[r*w+c] = byte'(v);
      end
    if (blur) begin
      tmp = new[w*h];
      for (int r = 0; r < h; r++)
        for (int c = 0; c < w; c++) begin
          int sum, n;
          sum = 0; n = 0;
          for (int dr = -1; dr <= 1; dr++)
            for (int dc = -1; dc <= 1; dc++)
              if (r+dr >= 0 && r+dr < h && c+dc >= 0 && c+dc < w) begin
                int p; p = im[(r+dr)*w + (c+dc)]; sum += p; n++;
              end
          tmp[r*w+c] = byte'(sum / n);
        end
      im = tmp;
    end
    return im;
  endfunction

  // Smooth round object (a shaded disc) on a flat background, few corners.
  function automatic img_t make_disc(int w, int h, int gain);
    img_t im = new[w*h];
    int   rad = (h < w ? h : w) / 3;
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) begin
        int dr, dc, v;
        dr = r - h/2; dc = c - w/2;
        v = 50;
        if (dr*dr + dc*dc <= rad*rad) v = 120 + (dc * 40) / rad;
        v = v * gain / 100;
        im[r*w+c] = byte'(v > 255 ? 255 : v);
      end
    return im;
  endfunction

  // Blur an image with a 3x3 box filter (edges use the pixels available).
  function automatic img_t box_blur(input img_t im, input int w, int h);
    img_t o = new[w*h];
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) begin
        int sum, n;
        sum = 0; n = 0;
        for (int dr = -1; dr <= 1; dr++)
          for (int dc = -1; dc <= 1; dc++)
            if (r+dr >= 0 && r+dr < h && c+dc >= 0 && c+dc < w) begin
              int p; p = im[(r+dr)*w + (c+dc)]; sum += p; n++;
            end
        o[r*w+c] = byte'(sum / n);
      end
    return o;
  endfunction

  // Two objects: a textured one in focus on the left and a blurred one on the right.
  function automatic img_t make_two_objects(int w, int h, int seed);
    img_t a = make_scene(w, h, seed, 100, 0);
    img_t b = box_blur(make_scene(w, h, seed + 1, 100, 0), w, h);
    img_t o = new[w*h];
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++)
        o[r*w+c] = (c < w/2) ? a[r*w + c + w/4] : b[r*w + c - w/4];
    return o;
  endfunction

endpackage
