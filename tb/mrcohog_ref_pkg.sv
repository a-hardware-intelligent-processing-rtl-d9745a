// mrcohog_ref_pkg: behavioural reference model of the accelerator for the
// testbenches. It works on whole images with integer and real arithmetic,
// written independently of the RTL: direction from $atan2, blocks and
// feature indices from multiplications, the full histogram in an
// associative array.
package mrcohog_ref_pkg;

  localparam int H = 64, W = 32;

  int img  [H][W];          // ROI pixels, 0..255
  int dmap [3][H][W];       // direction per resolution, -1 = none
  int hist [int];           // full co-occurrence histogram

  // Direction code of a gradient, -1 when the L1 magnitude is below thr.
  function automatic int ref_dir(int fx, int fy, int thr);
    real a;
    int  k;
    if ((fx < 0 ? -fx : fx) + (fy < 0 ? -fy : fy) < thr) return -1;
    a = $atan2(real'(fy), real'(fx)) * 180.0 / 3.14159265358979323846;
    if (a < 0.0) a = a + 360.0;
    k = int'($floor(a / 45.0 + 1e-9));
    return k % 8;
  endfunction

  function automatic int res_h(int r); return H >> r; endfunction
  function automatic int res_w(int r); return W >> r; endfunction

  // Pixel of resolution r (decimation of the full ROI).
  function automatic int pix(int r, int x, int y);
    return img[y << r][x << r];
  endfunction

  function automatic void compute_dirs(int thr);
    for (int r = 0; r < 3; r++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          dmap[r][y][x] = -1;
          if (y >= 1 && y < res_h(r) - 1 && x >= 1 && x < res_w(r) - 1)
            dmap[r][y][x] = ref_dir(pix(r, x + 1, y) - pix(r, x - 1, y),
                                    pix(r, x, y + 1) - pix(r, x, y - 1), thr);
        end
  endfunction

  function automatic int dget(int r, int x, int y);
    if (r > 2 || x < 0 || y < 0 || x >= res_w(r) || y >= res_h(r)) return -1;
    return dmap[r][y][x];
  endfunction

  function automatic int blk(int r, int x, int y);
    if (r == 0) return (y / 8) * 4 + x / 8;
    if (r == 1) return 32 + (y / 8) * 2 + x / 8;
    return 40 + y / 8;
  endfunction

  // Full histogram from dmap.
  function automatic void compute_hist();
    int dx [4] = '{-1, -1, 0, 1};
    int dy [4] = '{0, -1, -1, -1};
    hist.delete();
    for (int r = 0; r < 3; r++)
      for (int y = 0; y < res_h(r); y++)
        for (int x = 0; x < res_w(r); x++) begin
          int a, b, base;
          a = dget(r, x, y);
          if (a < 0) continue;
          base = blk(r, x, y) * 512;
          for (int p = 0; p < 4; p++) begin
            b = dget(r, x + dx[p], y + dy[p]);
            if (b >= 0) hist[base + p * 64 + a * 8 + b]++;
          end
          if (r < 2) begin
            b = dget(r + 1, x / 2, y / 2);
            if (b >= 0) hist[base + 4 * 64 + a * 8 + b]++;
          end
          if (r == 0) begin
            b = dget(2, x / 4, y / 4);
            if (b >= 0) hist[base + 5 * 64 + a * 8 + b]++;
          end
        end
  endfunction

  function automatic int hcount(int idx);
    if (hist.exists(idx)) return hist[idx];
    return 0;
  endfunction

  // Image generator: background level, a rectangle of another level, and
  // optional noise of +-amp.
  function automatic void gen_image(int bg, int fg, int x0, int y0, int x1, int y1, int amp);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int v;
        v = (x >= x0 && x <= x1 && y >= y0 && y <= y1) ? fg : bg;
        if (amp > 0) v = v + int'($urandom_range(2 * amp)) - amp;
        if (v < 0) v = 0;
        if (v > 255) v = 255;
        img[y][x] = v;
      end
  endfunction

  // A person-like silhouette: head disc and body ellipse over background.
  function automatic void gen_person(int bg, int fg, int cx, int amp);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int v, hx, hy, bx, by;
        hx = x - cx; hy = y - 10;
        bx = x - cx; by = y - 38;
        v = bg;
        if (hx * hx + hy * hy <= 36) v = fg;
        if (bx * bx * 4 + by * by <= 22 * 22) v = fg;
        if (amp > 0) v = v + int'($urandom_range(2 * amp)) - amp;
        if (v < 0) v = 0;
        if (v > 255) v = 255;
        img[y][x] = v;
      end
  endfunction

  function automatic logic [31:0] word_of(int i);
    int y, x;
    y = (i * 4) / W;
    x = (i * 4) % W;
    return {8'(img[y][x + 3]), 8'(img[y][x + 2]), 8'(img[y][x + 1]), 8'(img[y][x])};
  endfunction

endpackage
