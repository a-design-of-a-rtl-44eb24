// cpr_ref_pkg: software reference of the coarse-to-fine circle search, used
// by the testbenches to compute expected results independently of the RTL.
// Images live in the package array img[level][y], bit x of a row being
// pixel x (1 = black); level L has side 32 << L. The reference uses real
// arithmetic for the rounded distance and the same scan orders and tie rule
// as the hardware.
package cpr_ref_pkg;

  logic [255:0] img [5][256];

  typedef struct {
    int p, q, r, n, nn, level;
    bit ok;
  } res_t;

  int hn [256];
  int hnn [256];

  function automatic int rdist(int dx, int dy);
    return int'($floor($sqrt(real'(dx * dx + dy * dy)) + 0.5));
  endfunction

  function automatic void clear_img(int l);
    for (int y = 0; y < 256; y++) img[l][y] = '0;
  endfunction

  // img[l-1] from img[l] by the 2x2 OR rule.
  function automatic void coarsen(int l);
    int side;
    side = 32 << l;
    clear_img(l - 1);
    for (int y = 0; y < side / 2; y++)
      for (int x = 0; x < side / 2; x++)
        img[l-1][y][x] = img[l][2*y][2*x] | img[l][2*y][2*x+1] | img[l][2*y+1][2*x] | img[l][2*y+1][2*x+1];
  endfunction

  // Histograms hn (n_r) and hnn (N_r) of candidate (p, q) at level l.
  function automatic void histo(int l, int p, int q);
    int side, rmin, rmax;
    side = 32 << l; rmin = 5 << l; rmax = 15 << l;
    for (int r = 0; r < 256; r++) begin hn[r] = 0; hnn[r] = 0; end
    for (int y = 0; y < side; y++)
      for (int x = 0; x < side; x++) begin
        int r;
        r = rdist(x - p, y - q);
        if (r >= rmin && r <= rmax) begin
          hnn[r]++;
          if (img[l][y][x]) hn[r]++;
        end
      end
  endfunction

  function automatic res_t fold(res_t b, int l, int p, int q);
    for (int r = 5 << l; r <= 15 << l; r++)
      if (hnn[r] != 0 && hn[r] != 0 && (b.nn == 0 || longint'(hn[r]) * b.nn > longint'(b.n) * hnn[r])) begin
        b.p = p; b.q = q; b.r = r; b.n = hn[r]; b.nn = hnn[r];
      end
    return b;
  endfunction

  function automatic res_t empty_res(int l);
    res_t b;
    b.p = 0; b.q = 0; b.r = 0; b.n = 0; b.nn = 0; b.level = l; b.ok = 0;
    return b;
  endfunction

  // Full search on img[levels].
  function automatic res_t recognize(int levels);
    res_t b;
    int   cp, cq;
    for (int l = levels; l >= 1; l--) coarsen(l);
    b = empty_res(0);
    for (int q = 0; q < 32; q++)
      for (int p = 0; p < 32; p++) begin
        histo(0, p, q);
        b = fold(b, 0, p, q);
      end
    for (int l = 0; l <= levels; l++) begin
      b.level = l;
      b.ok = (b.nn != 0) && (2 * b.n >= b.nn);
      if (!b.ok || l == levels) return b;
      cp = 2 * b.p; cq = 2 * b.q;
      b = empty_res(l + 1);
      for (int dq = -1; dq <= 1; dq++)
        for (int dp = -1; dp <= 1; dp++) begin
          int pp, qq, sz;
          pp = cp + dp; qq = cq + dq; sz = 32 << (l + 1);
          if (pp >= 0 && qq >= 0 && pp < sz && qq < sz) begin
            histo(l + 1, pp, qq);
            b = fold(b, l + 1, pp, qq);
          end
        end
    end
    return b;
  endfunction

  // Test images: a one-pixel ring of radius rad around (cx, cy), and
  // straight lines standing for stalks and leaf edges.
  function automatic void draw_ring(int l, int cx, int cy, int rad);
    for (int y = 0; y < (32 << l); y++)
      for (int x = 0; x < (32 << l); x++)
        if (rdist(x - cx, y - cy) == rad) img[l][y][x] = 1'b1;
  endfunction

  function automatic void draw_line(int l, int x0, int y0, int x1, int y1);
    int steps, ax, ay;
    ax = (x1 > x0) ? x1 - x0 : x0 - x1;
    ay = (y1 > y0) ? y1 - y0 : y0 - y1;
    steps = (ax > ay) ? ax : ay;
    if (steps == 0) steps = 1;
    for (int i = 0; i <= steps; i++) begin
      int x, y;
      x = x0 + ((x1 - x0) * i) / steps;
      y = y0 + ((y1 - y0) * i) / steps;
      if (x >= 0 && y >= 0 && x < (32 << l) && y < (32 << l)) img[l][y][x] = 1'b1;
    end
  endfunction

  // 16-bit word w of row y of img[l] (pixel x in bit x % 16).
  function automatic logic [15:0] img_word(int l, int y, int w);
    return img[l][y][16 * w +: 16];
  endfunction

endpackage
