// eodm_ref_pkg: integer reference model of the edge-oriented demosaicker, for the
// testbenches. It recomputes every intermediate value of the pipeline (directional
// colour differences, weighted differences, edge strengths, edge type, candidate
// differences and the final RGB) with plain integer arithmetic on a frame held in
// the package variable `img`, indexed img[row][col]. Bayer phase is GRBG: a sample
// is green when row and column have the same parity, red on even rows otherwise,
// blue on odd rows otherwise. Divisions by powers of two round towards minus
// infinity, as the hardware's arithmetic shifts do.
package eodm_ref_pkg;

  int img [][];

  function automatic int fdiv(input int v, input int n);
    return (v >= 0) ? v / n : -((-v + n - 1) / n);
  endfunction

  function automatic int iabs(input int v);
    return (v < 0) ? -v : v;
  endfunction

  function automatic bit is_green(input int y, input int x);
    return (y % 2) == (x % 2);
  endfunction

  function automatic int px(input int y, input int x);
    return img[y][x];
  endfunction

  // five-tap green-minus-chroma difference
  function automatic int cd5(input int na, input int nb, input int cl, input int cc,
                             input int cr, input bit cg);
    int a, b;
    a = (na + nb) / 2;
    b = (cl + 2 * cc + cr) / 4;
    return cg ? (b - a) : (a - b);
  endfunction

  // three-tap green-minus-chroma difference
  function automatic int cd3(input int a, input int b, input int x, input bit xg);
    int m;
    m = (a + b) / 2;
    return xg ? (x - m) : (m - x);
  endfunction

  typedef struct {
    int dh [3][3];
    int dv [3][3];
    int dd [4];
    int dh_hat, dv_hat, dd_hat;
    int eh, ev;
    int c;          // 0..4 as the hardware codes it
    int cand [5];
    int d_star;
    int r, g, b;
  } ref_t;

  function automatic int wavg(input int d [3][3]);
    return fdiv(4 * d[1][1] + 2 * (d[0][1] + d[2][1] + d[1][0] + d[1][2])
                + d[0][0] + d[0][2] + d[2][0] + d[2][2], 16);
  endfunction

  function automatic int edge_of_line(input int p0, input int p1, input int p2);
    return iabs(p0 - p1) + iabs(p1 - p2);
  endfunction

  function automatic int clip(input int v);
    return (v < 0) ? 0 : (v > 255) ? 255 : v;
  endfunction

  function automatic int type_of(input int eh, input int ev);
    if (4 * eh <= ev) return 0;
    if (2 * eh <= ev) return 1;
    if (4 * ev <= eh) return 2;
    if (2 * ev <= eh) return 3;
    return 4;
  endfunction

  // full computation for centre (i, j); the 5 x 7 window must lie inside img
  function automatic ref_t compute(input int i, input int j);
    ref_t o;
    int   e [3];
    int   s;
    for (int a = 0; a < 3; a++)
      for (int b = 0; b < 3; b++) begin
        int y, x;
        // horizontal set: rows i-2, i, i+2; columns j-1 .. j+1
        y = i + 2 * a - 2;
        x = j + b - 1;
        o.dh[a][b] = cd5(px(y, x - 1), px(y, x + 1), px(y, x - 2), px(y, x), px(y, x + 2),
                         is_green(y, x));
        // vertical set: rows i-1 .. i+1; columns j-2, j, j+2
        y = i + a - 1;
        x = j + 2 * b - 2;
        if (a == 1)
          o.dv[a][b] = cd5(px(y - 1, x), px(y + 1, x), px(y - 2, x), px(y, x), px(y + 2, x),
                           is_green(y, x));
        else
          o.dv[a][b] = cd3(px(y - 1, x), px(y + 1, x), px(y, x), is_green(y, x));
      end
    s = 0;
    for (int k = 0; k < 4; k++) begin
      int y, x;
      y = i + ((k < 2) ? -1 : 1);
      x = j + ((k % 2 == 0) ? -1 : 1);
      o.dd[k] = fdiv(cd3(px(y, x - 1), px(y, x + 1), px(y, x), is_green(y, x))
                   + cd3(px(y - 1, x), px(y + 1, x), px(y, x), is_green(y, x)), 2);
      s += o.dd[k];
    end
    o.dh_hat = wavg(o.dh);
    o.dv_hat = wavg(o.dv);
    o.dd_hat = fdiv(s, 4);
    for (int l = 0; l < 3; l++) e[l] = edge_of_line(o.dh[l][0], o.dh[l][1], o.dh[l][2]);
    o.eh = (e[0] + 2 * e[1] + e[2]) / 4;
    for (int l = 0; l < 3; l++) e[l] = edge_of_line(o.dv[0][l], o.dv[1][l], o.dv[2][l]);
    o.ev = (e[0] + 2 * e[1] + e[2]) / 4;
    o.c = type_of(o.eh, o.ev);
    o.cand[0] = o.dh_hat;
    o.cand[1] = fdiv(3 * o.dh_hat + o.dv_hat, 4);
    o.cand[2] = o.dv_hat;
    o.cand[3] = fdiv(o.dh_hat + 3 * o.dv_hat, 4);
    o.cand[4] = fdiv(o.dh_hat + o.dv_hat, 2);
    o.d_star = o.cand[o.c];
    if (is_green(i, j)) begin
      int ch, cv;
      ch = clip(px(i, j) - o.dh_hat);
      cv = clip(px(i, j) - o.dv_hat);
      o.g = px(i, j);
      o.r = (i % 2 == 0) ? ch : cv;
      o.b = (i % 2 == 0) ? cv : ch;
    end else begin
      int gg, xx;
      gg = clip(px(i, j) + o.d_star);
      xx = clip(gg - o.dd_hat);
      o.g = gg;
      if (i % 2 == 0) begin o.r = px(i, j); o.b = xx; end
      else            begin o.b = px(i, j); o.r = xx; end
    end
    return o;
  endfunction

  // Test frame: a mix of regions that exercise every edge type. Samples are taken
  // from an RGB scene through the GRBG colour filter.
  function automatic void make_frame(input int h, input int w, input int seed);
    int unsigned st;
    st = 32'(seed) * 32'd2654435761 + 32'd12345;
    img = new[h];
    for (int y = 0; y < h; y++) begin
      img[y] = new[w];
      for (int x = 0; x < w; x++) begin
        int r, g, b, band;
        st = st * 32'd1664525 + 32'd1013904223;
        band = (x * 5) / w;
        case (band)
          0: begin g = ((x / 2) % 2) ? 200 : 40;  r = g - 20; b = g / 2; end          // vertical stripes
          1: begin g = ((y / 2) % 2) ? 180 : 30;  r = g / 2;  b = g - 10; end         // horizontal stripes
          2: begin g = (x + 2 * y) % 256; r = (3 * x) % 256; b = (2 * y) % 256; end    // ramps
          3: begin g = ((x / 3 + y) % 4 < 2) ? 220 : 60; r = g; b = 255 - g; end      // slanted edges
          default: begin g = int'(st[15:8]); r = int'(st[23:16]); b = int'(st[31:24]); end // noise
        endcase
        if (y % 2 == 0) img[y][x] = (x % 2 == 0) ? g : r;
        else            img[y][x] = (x % 2 == 0) ? b : g;
      end
    end
  endfunction

endpackage
