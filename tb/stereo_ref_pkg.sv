// stereo_ref_pkg: behavioural reference of the stereo algorithm, written
// straight from the equations for the self-checking testbenches. Images are
// int arrays indexed y*W+x holding 24-bit RGB (R in bits 23:16); the DSI is
// indexed (d*H + y)*W + x. Every stage follows the same conventions as the
// RTL: unfiltered row ends, border pixels left out of the SAD, component
// SADs summed and saturated to 13 bits, fixed-value boundaries for the three
// refinement rules, Q8 scale factors and the lowest disparity on ties.
package stereo_ref_pkg;

  localparam int CMAX = 8191;

  function automatic int comp(int p, int c);  // c: 0 R, 1 G, 2 B
    return (p >> (16 - 8 * c)) & 255;
  endfunction

  function automatic int q8(int c, int k);
    int r;
    r = (c * k) >>> 8;
    return (r > CMAX) ? CMAX : r;
  endfunction

  function automatic int iabs(int a);
    return (a < 0) ? -a : a;
  endfunction

  // weighted mean filter f' = (f(x-1) + 2 f(x) + f(x+1)) / 4 per component
  function automatic void wmean(input int img[], input int w, input int h, ref int o[]);
    o = new[w * h];
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        if (x == 0 || x == w - 1) o[y*w+x] = img[y*w+x];
        else begin
          int v;
          v = 0;
          for (int c = 0; c < 3; c++)
            v |= ((comp(img[y*w+x-1], c) + 2 * comp(img[y*w+x], c) +
                   comp(img[y*w+x+1], c)) >> 2) << (16 - 8 * c);
          o[y*w+x] = v;
        end
      end
  endfunction

  // SAD cost of pixel (x,y) at disparity d, 5x5 window
  function automatic int sad(input int l[], input int r[], input int w, input int h,
                             input int x, input int y, input int d);
    int s;
    s = 0;
    for (int c = 0; c < 3; c++)
      for (int v = -2; v <= 2; v++)
        for (int u = -2; u <= 2; u++) begin
          int yy, lx, rx;
          yy = y + v; lx = x + u; rx = lx - d;
          if (yy >= 0 && yy < h && lx >= 0 && lx < w && rx >= 0 && rx < w)
            s += iabs(comp(l[yy*w+lx], c) - comp(r[yy*w+rx], c));
        end
    return (s > CMAX) ? CMAX : s;
  endfunction

  function automatic void build_dsi(input int l[], input int r[], input int w, input int h,
                                    input int dr, ref int dsi[]);
    dsi = new[w * h * dr];
    for (int d = 0; d < dr; d++)
      for (int y = 0; y < h; y++)
        for (int x = 0; x < w; x++) dsi[(d*h+y)*w+x] = sad(l, r, w, h, x, y, d);
  endfunction

  // rule i: 3x3 mean in each plane
  function automatic void rule1(input int a[], input int w, input int h, input int dr, ref int o[]);
    o = new[w * h * dr];
    for (int d = 0; d < dr; d++)
      for (int y = 0; y < h; y++)
        for (int x = 0; x < w; x++) begin
          int s;
          if (x == 0 || y == 0 || x == w - 1 || y == h - 1) o[(d*h+y)*w+x] = a[(d*h+y)*w+x];
          else begin
            s = 0;
            for (int m = -1; m <= 1; m++)
              for (int n = -1; n <= 1; n++) s += a[(d*h+y+m)*w+x+n];
            o[(d*h+y)*w+x] = s / 9;
          end
        end
  endfunction

  // rule ii: along the disparity axis
  function automatic void rule2(input int a[], input int w, input int h, input int dr, ref int o[]);
    int p;
    p = w * h;
    o = new[w * h * dr];
    for (int d = 0; d < dr; d++)
      for (int i = 0; i < p; i++) begin
        int c, pr, nx;
        c = a[d*p+i];
        if (d == 0 || d == dr - 1) o[d*p+i] = c;
        else begin
          pr = a[(d-1)*p+i]; nx = a[(d+1)*p+i];
          if (2 * pr > c || 2 * nx > c)      o[d*p+i] = q8(c, 205);
          else if (2 * pr < c || 2 * nx < c) o[d*p+i] = q8(c, 154);
          else                               o[d*p+i] = c;
        end
      end
  endfunction

  // rule iii: 5x5 counts against the frequency of the mode
  function automatic void rule3(input int a[], input int w, input int h, input int dr, ref int o[]);
    o = new[w * h * dr];
    for (int d = 0; d < dr; d++)
      for (int y = 0; y < h; y++)
        for (int x = 0; x < w; x++) begin
          int c, k, p, mf;
          int nb[25];
          c = a[(d*h+y)*w+x];
          if (x < 2 || y < 2 || x > w - 3 || y > h - 3) o[(d*h+y)*w+x] = c;
          else begin
            k = 0; p = 0; mf = 0;
            for (int m = -2; m <= 2; m++)
              for (int n = -2; n <= 2; n++) begin
                nb[(m+2)*5+n+2] = a[(d*h+y+m)*w+x+n];
                if (2 * a[(d*h+y+m)*w+x+n] <= c) k++;
                else p++;
              end
            for (int i = 0; i < 25; i++) begin
              int cnt;
              cnt = 0;
              for (int j = 0; j < 25; j++) if (nb[i] == nb[j]) cnt++;
              if (cnt > mf) mf = cnt;
            end
            if (k >= mf)      o[(d*h+y)*w+x] = q8(c, 102);
            else if (p >= mf) o[(d*h+y)*w+x] = q8(c, 307);
            else              o[(d*h+y)*w+x] = c;
          end
        end
  endfunction

  function automatic void wta(input int a[], input int w, input int h, input int dr, ref int o[]);
    int p;
    p = w * h;
    o = new[p];
    for (int i = 0; i < p; i++) begin
      int best;
      best = a[i]; o[i] = 0;
      for (int d = 1; d < dr; d++)
        if (a[d*p+i] < best) begin best = a[d*p+i]; o[i] = d; end
    end
  endfunction

  // A stereo pair whose right image is the left one shifted by sh(y) pixels,
  // so the true disparity varies by row band. With bands = 1 the rows repeat
  // in groups of five: two rows at disparity 1, one flat grey row, two rows
  // at disparity 3; a window centred on the grey row then matches at d = 1
  // and d = 3 but not at d = 2, which puts a cost peak between two valleys.
  function automatic void make_pair(input int w, input int h, input int dr, input int seed,
                                    input bit bands, ref int l[], ref int r[]);
    int s;
    s = seed;
    l = new[w * h];
    r = new[w * h];
    for (int i = 0; i < w * h; i++) begin
      s = s * 1103515245 + 12345;
      l[i] = (s >>> 8) & 24'hffffff;
      if (bands && (i / w) % 5 == 2) l[i] = 24'h808080;
    end
    for (int y = 0; y < h; y++) begin
      int sh;
      if (bands) sh = ((y % 5) < 2) ? 1 : 3;
      else       sh = ((y / 4) * 3 + 1) % dr;
      for (int x = 0; x < w; x++)
        r[y*w+x] = (x + sh < w) ? l[y*w+x+sh] : l[y*w+x];
    end
  endfunction

endpackage
