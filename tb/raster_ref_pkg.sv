// raster_ref_pkg: double-precision reference rasterizer for the testbenches. For one
// triangle it lists, in scan order (rows top to bottom, pixels left to right within
// the bounding box), every pixel whose barycentric coordinates are all non-negative,
// with 6-bit colours (63 * value, truncated) and interpolated z, and returns the
// number of pixels in the clipped bounding box.
package raster_ref_pkg;
  import fp_ref_pkg::*;

  typedef struct {
    int  x, y, r, g, b;
    real z;
  } rpix_t;

  typedef struct {
    real x[3], y[3], z[3], r[3], g[3], b[3];
  } rtri_t;

  function automatic real fmin3(real a, real b, real c);
    real m;
    m = a; if (b < m) m = b; if (c < m) m = c; return m;
  endfunction
  function automatic real fmax3(real a, real b, real c);
    real m;
    m = a; if (b > m) m = b; if (c > m) m = c; return m;
  endfunction

  function automatic real hf(rtri_t t, int a, int b, real x, real y);
    return (t.x[b] - t.x[a]) * (y - t.y[a]) - (t.y[b] - t.y[a]) * (x - t.x[a]);
  endfunction

  function automatic int chan(real v);
    int i;
    i = int'($floor(v * 63.0 + 1.0e-9));
    if (i < 0) i = 0;
    if (i > 63) i = 63;
    return i;
  endfunction

  // returns the bounding-box pixel count (0 if off screen); pixels appended to q
  function automatic int raster(rtri_t t, ref rpix_t q[$], input int W = 640, input int H = 480);
    int x0, x1, y0, y1;
    real n23, n31, n12;
    x0 = int'($floor(fmin3(t.x[0], t.x[1], t.x[2])));
    x1 = int'($ceil(fmax3(t.x[0], t.x[1], t.x[2])));
    y0 = int'($floor(fmin3(t.y[0], t.y[1], t.y[2])));
    y1 = int'($ceil(fmax3(t.y[0], t.y[1], t.y[2])));
    if (x1 < 0 || y1 < 0 || x0 > W - 1 || y0 > H - 1) return 0;
    if (x0 < 0) x0 = 0;
    if (y0 < 0) y0 = 0;
    if (x1 > W - 1) x1 = W - 1;
    if (y1 > H - 1) y1 = H - 1;
    n23 = hf(t, 1, 2, t.x[0], t.y[0]);
    n31 = hf(t, 2, 0, t.x[1], t.y[1]);
    n12 = hf(t, 0, 1, t.x[2], t.y[2]);
    if (n23 != 0.0 && n31 != 0.0 && n12 != 0.0)
      for (int y = y0; y <= y1; y++)
        for (int x = x0; x <= x1; x++) begin
          real al, be, ga;
          rpix_t p;
          al = hf(t, 1, 2, x, y) / n23;
          be = hf(t, 2, 0, x, y) / n31;
          ga = hf(t, 0, 1, x, y) / n12;
          if (al >= 0 && be >= 0 && ga >= 0) begin
            p.x = x; p.y = y;
            p.r = chan(al * t.r[0] + be * t.r[1] + ga * t.r[2]);
            p.g = chan(al * t.g[0] + be * t.g[1] + ga * t.g[2]);
            p.b = chan(al * t.b[0] + be * t.b[1] + ga * t.b[2]);
            p.z = al * t.z[0] + be * t.z[1] + ga * t.z[2];
            q.push_back(p);
          end
        end
    return (x1 - x0 + 1) * (y1 - y0 + 1);
  endfunction

  // a random triangle with integer corners inside a w x h area at (ox, oy)
  function automatic rtri_t rand_tri(int ox, int oy, int w, int h);
    rtri_t t;
    for (int i = 0; i < 3; i++) begin
      t.x[i] = ox + real'($urandom % w);
      t.y[i] = oy + real'($urandom % h);
      t.z[i] = real'($urandom % 1000) / 1000.0;
      t.r[i] = real'($urandom % 256) / 256.0;
      t.g[i] = real'($urandom % 256) / 256.0;
      t.b[i] = real'($urandom % 256) / 256.0;
    end
    return t;
  endfunction

  // compare a 96-bit pixel word with a reference pixel: same position, each colour
  // within one step, z within 1e-4
  function automatic bit pix_match(logic [95:0] w, rpix_t p);
    int r, g, b;
    real dz;
    r = int'(w[55:50]); g = int'(w[47:42]); b = int'(w[39:34]);
    dz = to_real(w[31:0]) - p.z;
    if (dz < 0) dz = -dz;
    return int'(w[73:64]) == p.x && int'(w[88:80]) == p.y &&
           r - p.r <= 1 && p.r - r <= 1 && g - p.g <= 1 && p.g - g <= 1 &&
           b - p.b <= 1 && p.b - b <= 1 && dz <= 1.0e-4;
  endfunction
endpackage
