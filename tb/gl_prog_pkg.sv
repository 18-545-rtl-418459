// gl_prog_pkg: builds instruction-word programs for the pipeline and keeps a
// double-precision reference model of what the coordinate transform must output.
// Each call appends the instruction word (bit 31 type, 30:8 data, 7:0 opcode) and
// its argument words, and updates the model: modelview and projection stacks,
// viewport, colour, and the list of expected window-space vertices.
package gl_prog_pkg;
  import fp_ref_pkg::*;

  typedef real mat_t [4][4];

  typedef struct {
    bit  flush;
    real x, y, z;
    real r, g, b;
  } vtx_t;

  class gl_prog;
    logic [31:0] words [$];
    mat_t        mv [16];
    mat_t        pj [16];
    int          mv_sp, pj_sp, mode;
    real         vpx, vpy, vpw, vph;
    real         cr, cg, cb;
    vtx_t        expected [$];

    function new();
      mv_sp = 0; pj_sp = 0; mode = 0;
      mv[0] = ident(); pj[0] = ident();
      vpx = 0; vpy = 0; vpw = 640; vph = 480;
      cr = 1; cg = 1; cb = 1;
    endfunction

    static function mat_t ident();
      mat_t m;
      for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) m[r][c] = (r == c) ? 1.0 : 0.0;
      return m;
    endfunction

    function void instr(logic [7:0] op, bit t, int data);
      words.push_back({t, 23'(data), op});
    endfunction

    function void fl(real v);
      words.push_back(from_real(v));
    endfunction

    function void top_mul(mat_t m);
      mat_t a, c;
      a = mode ? pj[pj_sp] : mv[mv_sp];
      for (int r = 0; r < 4; r++) for (int k = 0; k < 4; k++) begin
        c[r][k] = 0;
        for (int j = 0; j < 4; j++) c[r][k] += a[r][j] * m[j][k];
      end
      if (mode) pj[pj_sp] = c; else mv[mv_sp] = c;
    endfunction

    function void gl_begin();  instr(8'h01, 0, 0); endfunction
    function void gl_end();    instr(8'h02, 0, 0); endfunction
    function void matrix_mode(int m); instr(8'h10, 0, m ? 32'h1701 : 32'h1700); mode = m; endfunction
    function void load_identity();
      instr(8'h12, 0, 0);
      if (mode) pj[pj_sp] = ident(); else mv[mv_sp] = ident();
    endfunction
    function void push();
      instr(8'h14, 0, 0);
      if (mode) begin pj[pj_sp + 1] = pj[pj_sp]; pj_sp++; end
      else begin mv[mv_sp + 1] = mv[mv_sp]; mv_sp++; end
    endfunction
    function void pop();
      instr(8'h15, 0, 0);
      if (mode) pj_sp--; else mv_sp--;
    endfunction
    function void mult_matrix(mat_t m);
      instr(8'h11, 1, 16);
      for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++) fl(m[r][c]);
      top_mul(m);
    endfunction
    function void load_matrix(mat_t m);
      instr(8'h13, 1, 16);
      for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++) fl(m[r][c]);
      if (mode) pj[pj_sp] = m; else mv[mv_sp] = m;
    endfunction
    function void scale(real x, real y, real z);
      mat_t m;
      instr(8'h17, 1, 3); fl(x); fl(y); fl(z);
      m = ident(); m[0][0] = x; m[1][1] = y; m[2][2] = z;
      top_mul(m);
    endfunction
    function void translate(real x, real y, real z);
      mat_t m;
      instr(8'h18, 1, 3); fl(x); fl(y); fl(z);
      m = ident(); m[0][3] = x; m[1][3] = y; m[2][3] = z;
      top_mul(m);
    endfunction
    function void viewport(int x, int y, int w, int h);
      instr(8'h19, 1, 4);
      words.push_back(x); words.push_back(y); words.push_back(w); words.push_back(h);
      vpx = x; vpy = y; vpw = w; vph = h;
    endfunction
    function void color(real r, real g, real b);
      instr(8'h04, 1, 3); fl(r); fl(g); fl(b);
      cr = r; cg = g; cb = b;
    endfunction
    function void vertex(real x, real y, real z);
      real v[4], e[4], c[4];
      vtx_t o;
      instr(8'h03, 1, 3); fl(x); fl(y); fl(z);
      v = '{x, y, z, 1.0};
      for (int r = 0; r < 4; r++) begin
        e[r] = 0;
        for (int k = 0; k < 4; k++) e[r] += mv[mv_sp][r][k] * v[k];
      end
      for (int r = 0; r < 4; r++) begin
        c[r] = 0;
        for (int k = 0; k < 4; k++) c[r] += pj[pj_sp][r][k] * e[k];
      end
      o.flush = 0;
      o.x = vpw / 2 * (c[0] / c[3]) + (vpx + vpw / 2);
      o.y = vph / 2 * (c[1] / c[3]) + (vpy + vph / 2);
      o.z = 0.5 * (c[2] / c[3]) + 0.5;
      o.r = cr; o.g = cg; o.b = cb;
      expected.push_back(o);
    endfunction
    function void flush();
      vtx_t o;
      instr(8'h05, 0, 0);
      o.flush = 1; o.x = 0; o.y = 0; o.z = 0; o.r = cr; o.g = cg; o.b = cb;
      expected.push_back(o);
    endfunction
    function void finish();
      words.push_back(32'd0);
    endfunction
  endclass

  // true when the single-precision value f is within a relative/absolute tolerance
  function automatic bit close(logic [31:0] f, real e, real tol = 1.0e-4);
    real d, m;
    d = to_real(f) - e;
    if (d < 0) d = -d;
    m = (e < 0) ? -e : e;
    if (m < 1.0) m = 1.0;
    return d <= tol * m;
  endfunction
endpackage
