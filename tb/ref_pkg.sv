// ref_pkg: reference models used by the testbenches. They are written
// independently of the RTL: the Huffman tables are built with the standard
// canonical-code algorithm from per-index code lengths, the colour
// transform uses plain integer arithmetic with explicit floor division, the
// SUSAN mask is the set of offsets with dx^2 + dy^2 <= 11, and frames are
// held as whole arrays rather than streams.
package ref_pkg;

  int luma_len[256], luma_code[256];
  int chroma_len[64], chroma_code[64];

  function automatic int len_of(bit chroma, int k);
    if (!chroma) begin
      if (k == 0) return 2;
      if (k < 3)  return 3;
      if (k < 7)  return 4;
      if (k < 15) return 6;
      if (k < 31) return 8;
      return 12;
    end
    if (k == 0) return 1;
    if (k < 3)  return 3;
    if (k < 7)  return 5;
    return 9;
  endfunction

  // canonical code assignment (shorter codes first, then by index)
  function automatic void init_tables();
    int bl[16], nxt[16], code, n;
    for (int ch = 0; ch < 2; ch++) begin
      n = ch ? 64 : 256;
      foreach (bl[i]) bl[i] = 0;
      for (int k = 0; k < n; k++) bl[len_of(ch[0], k)]++;
      code = 0;
      for (int b = 1; b < 16; b++) begin
        code   = (code + bl[b-1]) << 1;
        nxt[b] = code;
      end
      for (int k = 0; k < n; k++) begin
        int l;
        l = len_of(ch[0], k);
        if (ch) begin chroma_len[k] = l; chroma_code[k] = nxt[l]; end
        else    begin luma_len[k]   = l; luma_code[k]   = nxt[l]; end
        nxt[l]++;
      end
    end
  endfunction

  // symbol (difference modulo 2^bits) to signed value, then to index
  function automatic int sym_index(bit chroma, int sym);
    int bits, v;
    bits = chroma ? 6 : 8;
    v = sym % (1 << bits);
    if (v >= (1 << (bits - 1))) v -= (1 << bits);
    return (v >= 0) ? 2 * v : -2 * v - 1;
  endfunction

  function automatic int fdiv(int a, int b);  // floor division, b > 0
    int q;
    q = a / b;
    if ((a % b != 0) && (a < 0)) q--;
    return q;
  endfunction

  function automatic int clamp(int v, int lo, int hi);
    return v < lo ? lo : v > hi ? hi : v;
  endfunction

  // colour transform: Y 8 bits, U, V as signed values -32..31
  function automatic void to_yuv(int r, int g, int b, output int y, output int u, output int v);
    y = (r + 2 * g + b) / 4;
    u = clamp(fdiv(b - g + 4, 8), -32, 31);
    v = clamp(fdiv(r - g + 4, 8), -32, 31);
  endfunction

  function automatic void to_rgb(int y, int u, int v, output int r, output int g, output int b);
    int uu, vv, gg;
    uu = u * 8;
    vv = v * 8;
    gg = y - fdiv(uu + vv, 4);
    r = clamp(vv + gg, 0, 255);
    g = clamp(gg, 0, 255);
    b = clamp(uu + gg, 0, 255);
  endfunction

  function automatic int gray(int r, int g, int b);
    return (r + 2 * g + b) / 4;
  endfunction

  // prediction from left neighbour a and upper neighbour b
  function automatic int pred(bit chroma, bit has_a, bit has_b, int a, int b);
    if (has_a && has_b) return fdiv(a + b, 2);
    if (has_a) return a;
    if (has_b) return b;
    return chroma ? 0 : 128;
  endfunction

  // Frame of RGB pixels -> Y,U,V difference symbols (3 per pixel).
  function automatic void frame_to_syms(int w, int h, const ref int rgb[][3], ref int syms[$]);
    int yuv[][3];
    yuv = new[w * h];
    syms.delete();
    for (int i = 0; i < w * h; i++) to_yuv(rgb[i][0], rgb[i][1], rgb[i][2], yuv[i][0], yuv[i][1], yuv[i][2]);
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++)
        for (int ch = 0; ch < 3; ch++) begin
          int p, d, bits;
          bits = ch ? 6 : 8;
          p = pred(ch != 0, c > 0, r > 0, c > 0 ? yuv[r*w+c-1][ch] : 0, r > 0 ? yuv[(r-1)*w+c][ch] : 0);
          d = yuv[r*w+c][ch] - p;
          d = ((d % (1 << bits)) + (1 << bits)) % (1 << bits);
          syms.push_back(d);
        end
  endfunction

  // Symbols -> reconstructed RGB frame (what the image decoder must output).
  function automatic void syms_to_frame(int w, int h, const ref int syms[$], ref int rgb[][3]);
    int yuv[][3];
    yuv = new[w * h];
    rgb = new[w * h];
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) begin
        for (int ch = 0; ch < 3; ch++) begin
          int p, v, bits;
          bits = ch ? 6 : 8;
          p = pred(ch != 0, c > 0, r > 0, c > 0 ? yuv[r*w+c-1][ch] : 0, r > 0 ? yuv[(r-1)*w+c][ch] : 0);
          v = ((p + syms[(r*w+c)*3+ch]) % (1 << bits) + (1 << bits)) % (1 << bits);
          if (ch != 0 && v >= 32) v -= 64;
          yuv[r*w+c][ch] = v;
        end
        to_rgb(yuv[r*w+c][0], yuv[r*w+c][1], yuv[r*w+c][2], rgb[r*w+c][0], rgb[r*w+c][1], rgb[r*w+c][2]);
      end
  endfunction

  // Symbols (Y,U,V order) -> bytes, MSB first, padded with zeros.
  function automatic void syms_to_bytes(const ref int syms[$], ref byte unsigned bytes[$]);
    bit bits[$];
    for (int i = 0; i < syms.size(); i++) begin
      bit chroma;
      int k, l, c;
      chroma = (i % 3) != 0;
      k = sym_index(chroma, syms[i]);
      l = chroma ? chroma_len[k] : luma_len[k];
      c = chroma ? chroma_code[k] : luma_code[k];
      for (int b = l - 1; b >= 0; b--) bits.push_back(c[b]);
    end
    while (bits.size() % 8 != 0) bits.push_back(1'b0);
    bytes.delete();
    for (int i = 0; i < bits.size(); i += 8) begin
      byte unsigned v;
      v = 0;
      for (int b = 0; b < 8; b++) v = {v[6:0], bits[i+b]};
      bytes.push_back(v);
    end
  endfunction

  // Number of code bits of a symbol stream (to see whether padding occurs).
  function automatic int code_bits(const ref int syms[$]);
    int n;
    n = 0;
    for (int i = 0; i < syms.size(); i++)
      n += ((i % 3) != 0) ? chroma_len[sym_index(1, syms[i])] : luma_len[sym_index(0, syms[i])];
    return n;
  endfunction

  // Image under test for the neighbourhood operators (set by the caller).
  int img_w, img_h;
  int img[];

  function automatic void set_image(int w, int h, int pix[]);
    img_w = w;
    img_h = h;
    img = pix;
  endfunction

  // neighbourhood read with the border rule: outside pixels take the centre
  function automatic int px(int r, int c, int dr, int dc);
    if (r + dr < 0 || r + dr >= img_h || c + dc < 0 || c + dc >= img_w) return img[r*img_w+c];
    return img[(r+dr)*img_w + c+dc];
  endfunction

  function automatic int sobel_at(int r, int c);
    int gx, gy, m;
    gx = 0; gy = 0;
    for (int d = -1; d <= 1; d++) begin
      int wt;
      wt = (d == 0) ? 2 : 1;
      gx += wt * (px(r, c, d, 1) - px(r, c, d, -1));
      gy += wt * (px(r, c, 1, d) - px(r, c, -1, d));
    end
    m = (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy);
    return m > 255 ? 255 : m;
  endfunction

  // SUSAN: mode 1 edge (g = 27), mode 2 corner (g = 18 + centroid test)
  function automatic int susan_at(int r, int c, int mode, int t);
    int n, sx, sy, g, c0;
    n = 0; sx = 0; sy = 0;
    c0 = img[r*img_w+c];
    for (int dr = -3; dr <= 3; dr++)
      for (int dc = -3; dc <= 3; dc++)
        if (dr*dr + dc*dc <= 11) begin
          int p, d;
          p = px(r, c, dr, dc);
          d = p - c0;
          if (d <= t && -d <= t) begin
            n++; sx += dc; sy += dr;
          end
        end
    g = (mode == 1) ? 27 : 18;
    if (n >= g) return 0;
    if (mode == 2 && sx*sx + sy*sy < n*n) return 0;
    return (g - n) * 8;
  endfunction

  function automatic int algo_at(int r, int c, int mode);
    if (mode == 1 || mode == 2) return susan_at(r, c, mode, 20);
    return sobel_at(r, c);
  endfunction

  // Test picture: smooth shading, a bright rectangle, a dark triangle, a
  // thin line, a dot and a little noise, so that edges and corners of
  // several kinds occur.
  function automatic void make_image(int w, int h, int seed, ref int rgb[][3]);
    int s;
    s = seed;
    rgb = new[w * h];
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) begin
        int base[3];
        base[0] = 40 + (c * 100) / w + (seed % 7) * 10;
        base[1] = 60 + (r * 80) / h;
        base[2] = 90 + ((r + c) * 50) / (w + h);
        if (r >= h/4 && r < h/2 && c >= w/4 && c < (w*3)/5) begin
          base[0] += 120; base[1] += 110; base[2] += 90;
        end
        if (r > h/2 && c > w/2 && (c - w/2) < (r - h/2) * 2) begin
          base[0] -= 30; base[1] -= 50; base[2] -= 60;
        end
        // a one-pixel line and an isolated dot: small but centred USANs
        if (r == (h*7)/8 && c < w/3) begin
          base[0] += 90; base[1] += 90; base[2] += 90;
        end
        if (r == (h*5)/8 && c == w/8) begin
          base[0] += 100; base[1] += 100; base[2] += 100;
        end
        for (int k = 0; k < 3; k++) begin
          s = s * 1103515245 + 12345;
          rgb[r*w+c][k] = clamp(base[k] + ((s >>> 16) & 7) - 3, 0, 255);
        end
      end
  endfunction

  // Video test frame t: a fixed shaded background and a bright hand-like
  // blob (an ellipse with a raised bar) that moves across the picture, as
  // with a fixed camera and a moving hand.
  function automatic void make_motion_frame(int w, int h, int t, ref int rgb[][3]);
    int cx, cy, s;
    rgb = new[w * h];
    cx = w / 6 + (t * w) / 18;
    cy = h / 2 + ((t % 4) - 2) * (h / 24);
    s = 7;
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) begin
        int v[3], dx, dy;
        v[0] = 60 + (c * 60) / w;
        v[1] = 70 + (r * 50) / h;
        v[2] = 80;
        dx = c - cx; dy = r - cy;
        if (dx * dx * 4 + dy * dy * 9 < (w * w) / 16 ||
            (dx > 0 && dx < w / 5 && dy > -h / 20 && dy < h / 20)) begin
          v[0] = 200; v[1] = 150; v[2] = 120;
        end
        for (int k = 0; k < 3; k++) begin
          s = s * 1103515245 + 12345;
          rgb[r*w+c][k] = clamp(v[k] + ((s >>> 16) & 3) - 1, 0, 255);
        end
      end
  endfunction

endpackage
