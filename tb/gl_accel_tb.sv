// gl_accel_tb: end-to-end test of the whole pipeline at its default sizes (640x480
// screen, 512-word instruction cache, 16-deep matrix stacks, 16-entry FIFOs).
//
// A program is built with gl_prog (which also keeps a double-precision model of the
// transform) and loaded through the BRAM port: viewport, a perspective projection
// loaded as a matrix, then two frames, each an octahedron (eight triangles with
// per-vertex colours) placed by translate / rotate (as a multiplied matrix) / scale
// between glPushMatrix and glPopMatrix, and closed by glFlush. The three clock
// domains run at different, unrelated periods; the bus model (plb_mem_model) adds
// random acknowledge latency.
// Checked at three points:
//   - every vertex and colour leaving the coordinate transform, against the model;
//   - every pixel leaving the rasterizer, against a double-precision rasterization of
//     the triangles made of those vertices (pixels within 1e-3 of an edge in
//     barycentric terms may go either way);
//   - the frame buffer and z buffer of each finished frame, word by word, against a
//     model that applies the depth test to the pixel stream; after the second swap the
//     first set must have been cleared by the DMA engine.
// It also counts the pipeline's mechanisms and fails if one never happens: vertex /
// colour FIFO full (transform stalls), pixel FIFO full (rasterizer stalls), depth test
// rejections, buffer swaps, DMA clears, matrix push and pop, matrix multiplies,
// perspective division by w != 1, and the pre-fetch unit holding a triangle while
// the core is busy.
module gl_accel_tb;
  import gl_pkg::*;
  import fp_ref_pkg::*;
  import gl_prog_pkg::*;

  localparam int W = 640, H = 480;
  localparam logic [31:0] FB_BASE = 32'h9000_0000;

  logic ct_clk = 0, raster_clk = 0, fbw_clk = 0;
  logic ct_rst = 1, raster_rst = 1, fbw_rst = 1;
  logic BRAM_rst = 0, start = 0;
  logic [3:0]  BRAM_wen = 0;
  logic [31:0] BRAM_addr = 0, BRAM_din = 0, BRAM_dout;
  logic running, done, stack_error, raster_idle, draw_buf, clearing;
  logic bus_req, bus_we, bus_ack;
  logic [31:0] bus_addr, bus_wdata, bus_rdata, display_base;
  int dma_fills;

  always #5 ct_clk = ~ct_clk;
  always #4 raster_clk = ~raster_clk;
  always #3 fbw_clk = ~fbw_clk;

  gl_accel dut (.*);

  plb_mem_model mem (
      .clk(fbw_clk), .bus_req, .bus_we, .bus_addr, .bus_wdata, .bus_rdata, .bus_ack,
      .display_base, .dma_fills);

  int checks = 0, failures = 0;
  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (3_000_000) @(posedge ct_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- program
  gl_prog p;

  function automatic mat_t rot(real ax, real ay);
    mat_t rx, ry, m;
    rx = gl_prog::ident(); ry = gl_prog::ident();
    rx[1][1] = $cos(ax); rx[1][2] = -$sin(ax); rx[2][1] = $sin(ax); rx[2][2] = $cos(ax);
    ry[0][0] = $cos(ay); ry[0][2] = $sin(ay); ry[2][0] = -$sin(ay); ry[2][2] = $cos(ay);
    for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) begin
      m[r][c] = 0;
      for (int k = 0; k < 4; k++) m[r][c] += rx[r][k] * ry[k][c];
    end
    return m;
  endfunction

  // perspective projection as the host computes it for glFrustum
  function automatic mat_t frustum(real l, real r, real b, real t, real n, real f);
    mat_t m;
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) m[i][j] = 0;
    m[0][0] = 2 * n / (r - l); m[0][2] = (r + l) / (r - l);
    m[1][1] = 2 * n / (t - b); m[1][2] = (t + b) / (t - b);
    m[2][2] = -(f + n) / (f - n); m[2][3] = -2 * f * n / (f - n);
    m[3][2] = -1;
    return m;
  endfunction

  task automatic octa_vertex(real x, real y, real z);
    p.color((x + 1) / 2, (y + 1) / 2, 0.25 + (z + 1) / 4);
    p.vertex(x, y, z);
  endtask

  task automatic octahedron();
    p.gl_begin();
    for (int s = 0; s < 8; s++) begin
      real sx, sy, sz;
      sx = s[0] ? -1 : 1; sy = s[1] ? -1 : 1; sz = s[2] ? -1 : 1;
      octa_vertex(sx, 0, 0);
      octa_vertex(0, sy, 0);
      octa_vertex(0, 0, sz);
    end
    p.gl_end();
  endtask

  task automatic build();
    p = new();
    p.viewport(0, 0, W, H);
    p.matrix_mode(1);
    p.load_identity();
    p.load_matrix(frustum(-1, 1, -0.75, 0.75, 2, 10));
    p.matrix_mode(0);
    p.load_identity();
    p.translate(0, 0, -5);
    // frame 1
    p.push();
    p.mult_matrix(rot(0.35, 0.5));
    p.scale(1.3, 1.3, 1.3);
    octahedron();
    p.pop();
    p.flush();
    // frame 2
    p.push();
    p.translate(0.4, -0.2, 0);
    p.mult_matrix(rot(-0.6, 1.2));
    p.scale(1.1, 1.5, 1.1);
    octahedron();
    p.pop();
    p.flush();
    p.finish();
  endtask

  // ---------------------------------------------------------------- vertex check
  vtx_t   exp_v [$];
  vec3_t  hw_v [$], hw_c [$];
  int     n_vtx = 0, n_persp = 0;

  typedef struct {
    bit  flush, opt;
    int  x, y, r, g, b;
    real z;
  } epix_t;
  epix_t exp_p [$];

  function automatic int chan(real v);
    int i;
    i = int'($floor(v * 63.0 + 1.0e-9));
    return (i < 0) ? 0 : (i > 63) ? 63 : i;
  endfunction

  // reference rasterization of one triangle made of the transform's actual output
  function automatic void ref_tri(vec3_t v[3], vec3_t c[3]);
    real x[3], y[3], z[3], n23, n31, n12;
    int  x0, x1, y0, y1;
    for (int i = 0; i < 3; i++) begin
      x[i] = to_real(v[i].x); y[i] = to_real(v[i].y); z[i] = to_real(v[i].z);
    end
    x0 = int'($floor(raster_ref_pkg::fmin3(x[0], x[1], x[2])));
    x1 = int'($ceil(raster_ref_pkg::fmax3(x[0], x[1], x[2])));
    y0 = int'($floor(raster_ref_pkg::fmin3(y[0], y[1], y[2])));
    y1 = int'($ceil(raster_ref_pkg::fmax3(y[0], y[1], y[2])));
    if (x1 < 0 || y1 < 0 || x0 > W - 1 || y0 > H - 1) return;
    if (x0 < 0) x0 = 0;
    if (y0 < 0) y0 = 0;
    if (x1 > W - 1) x1 = W - 1;
    if (y1 > H - 1) y1 = H - 1;
    n23 = (x[2] - x[1]) * (y[0] - y[1]) - (y[2] - y[1]) * (x[0] - x[1]);
    n31 = (x[0] - x[2]) * (y[1] - y[2]) - (y[0] - y[2]) * (x[1] - x[2]);
    n12 = (x[1] - x[0]) * (y[2] - y[0]) - (y[1] - y[0]) * (x[2] - x[0]);
    if (n23 == 0.0 || n31 == 0.0 || n12 == 0.0) return;
    for (int py = y0; py <= y1; py++)
      for (int px = x0; px <= x1; px++) begin
        real al, be, ga, mn;
        epix_t e;
        al = ((x[2] - x[1]) * (py - y[1]) - (y[2] - y[1]) * (px - x[1])) / n23;
        be = ((x[0] - x[2]) * (py - y[2]) - (y[0] - y[2]) * (px - x[2])) / n31;
        ga = ((x[1] - x[0]) * (py - y[0]) - (y[1] - y[0]) * (px - x[0])) / n12;
        mn = raster_ref_pkg::fmin3(al, be, ga);
        if (mn >= -1.0e-3) begin
          e.flush = 0;
          e.opt = mn < 1.0e-3;
          e.x = px; e.y = py;
          e.r = chan(al * to_real(c[0].x) + be * to_real(c[1].x) + ga * to_real(c[2].x));
          e.g = chan(al * to_real(c[0].y) + be * to_real(c[1].y) + ga * to_real(c[2].y));
          e.b = chan(al * to_real(c[0].z) + be * to_real(c[1].z) + ga * to_real(c[2].z));
          e.z = al * z[0] + be * z[1] + ga * z[2];
          exp_p.push_back(e);
        end
      end
  endfunction

  always @(posedge ct_clk) if (!ct_rst && dut.u_ct.fifo_wr) begin
    vtx_t  e;
    vec3_t v, c;
    v = dut.u_ct.vtx_data;
    c = dut.u_ct.color_data;
    n_vtx++;
    chk(exp_v.size() > 0, "unexpected vertex");
    if (exp_v.size() > 0) begin
      e = exp_v.pop_front();
      if (e.flush) begin
        chk(v == '{FP_FLUSH, FP_FLUSH, FP_FLUSH}, "flush marker");
        chk(hw_v.size() == 0, "flush in the middle of a triangle");
        hw_v.delete(); hw_c.delete();
        exp_p.push_back('{flush: 1, opt: 0, x: 0, y: 0, r: 0, g: 0, b: 0, z: 0.0});
      end else begin
        chk(close(v.x, e.x, 1e-4) && close(v.y, e.y, 1e-4) && close(v.z, e.z, 1e-4),
            $sformatf("vertex %0d: (%f,%f,%f) expected (%f,%f,%f)", n_vtx, to_real(v.x),
                      to_real(v.y), to_real(v.z), e.x, e.y, e.z));
        chk(close(c.x, e.r, 1e-6) && close(c.y, e.g, 1e-6) && close(c.z, e.b, 1e-6),
            $sformatf("colour of vertex %0d", n_vtx));
        if (dut.u_ct.clip[3] != FP_ONE) n_persp++;
        hw_v.push_back(v);
        hw_c.push_back(c);
        if (hw_v.size() == 3) begin
          vec3_t tv[3], tc[3];
          for (int i = 0; i < 3; i++) begin
            tv[i] = hw_v.pop_front();
            tc[i] = hw_c.pop_front();
          end
          ref_tri(tv, tc);
        end
      end
    end
  end

  // ---------------------------------------------------------------- pixel check
  // frame model: depth test applied to the rasterizer's output stream
  logic [31:0] mz [2][W * H];
  logic [31:0] mc [2][W * H];
  int          model_set = 0, n_pix = 0, model_rejects = 0, pix_flushes = 0;

  task automatic model_clear(int s);
    for (int i = 0; i < W * H; i++) begin
      mz[s][i] = 0;
      mc[s][i] = 0;
    end
  endtask

  function automatic bit pix_ok(logic [95:0] w, epix_t e);
    real dz;
    int  r, g, b;
    r = int'(w[55:50]); g = int'(w[47:42]); b = int'(w[39:34]);
    dz = to_real(w[31:0]) - e.z;
    if (dz < 0) dz = -dz;
    return r - e.r <= 1 && e.r - r <= 1 && g - e.g <= 1 && e.g - g <= 1 &&
           b - e.b <= 1 && e.b - b <= 1 && dz <= 5.0e-4;
  endfunction

  always @(posedge raster_clk) if (!raster_rst && dut.u_raster.pixel_wr) begin
    logic [95:0] w;
    pixel_t      px;
    bit          placed;
    w  = dut.u_raster.pixel_data;
    px = pixel_t'(w);
    if (w == PIXEL_FLUSH) begin
      pix_flushes++;
      while (exp_p.size() > 0 && !exp_p[0].flush && exp_p[0].opt) void'(exp_p.pop_front());
      chk(exp_p.size() > 0 && exp_p[0].flush, "flush token out of place");
      while (exp_p.size() > 0 && !exp_p[0].flush) void'(exp_p.pop_front());
      if (exp_p.size() > 0) void'(exp_p.pop_front());
      model_set = 1 - model_set;
    end else begin
      int a;
      n_pix++;
      placed = 0;
      while (!placed && exp_p.size() > 0 && !exp_p[0].flush) begin
        epix_t e;
        e = exp_p.pop_front();
        if (e.x == int'(px.x) && e.y == int'(px.y)) begin
          chk(pix_ok(w, e), $sformatf("pixel (%0d,%0d) value %h", e.x, e.y, w));
          placed = 1;
        end else if (!e.opt) chk(0, $sformatf("pixel (%0d,%0d) missing", e.x, e.y));
      end
      chk(placed, $sformatf("unexpected pixel (%0d,%0d)", px.x, px.y));
      a = int'(px.y) * W + int'(px.x);
      if (mz[model_set][a] == 0 || w[31:0] < mz[model_set][a]) begin
        mz[model_set][a] = w[31:0];
        mc[model_set][a] = w[63:32];
      end else model_rejects++;
    end
  end

  // ---------------------------------------------------------------- mechanism counters
  int n_vfull = 0, n_pfull = 0, n_zrej = 0, n_push = 0, n_pop = 0, n_mult = 0, n_overlap = 0;
  always @(posedge ct_clk) if (!ct_rst) begin
    if (dut.u_ct.out_valid && (dut.u_ct.vtx_full || dut.u_ct.color_full)) n_vfull++;
    if (dut.u_ct.stk_push) n_push++;
    if (dut.u_ct.stk_pop) n_pop++;
    if (dut.u_ct.mult_start) n_mult++;
  end
  always @(posedge raster_clk) if (!raster_rst) begin
    if (dut.u_raster.pixel_full && dut.u_raster.u_core.state == dut.u_raster.u_core.C_SCAN)
      n_pfull++;
    if (dut.u_raster.u_prefetch.tri_valid && !dut.u_raster.u_prefetch.core_ready) n_overlap++;
  end
  always @(posedge fbw_clk) if (!fbw_rst)
    if (dut.u_fbw.state == dut.u_fbw.W_ZRD && bus_ack &&
        !(bus_rdata == 0 || dut.u_fbw.pix.z < bus_rdata)) n_zrej++;

  // ---------------------------------------------------------------- frame check
  task automatic check_set(int s, string what);
    int bad = 0;
    logic [31:0] base;
    base = FB_BASE | (32'(s) << 22);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        logic [31:0] a, c, z;
        a = base | (32'(y) << 12) | (32'(x) << 2);
        c = mem.peek(a);
        z = mem.peek(a | (32'd1 << 21));
        if (c != mc[s][y * W + x] || z != mz[s][y * W + x]) begin
          bad++;
          if (bad < 5)
            $display("  %s (%0d,%0d): colour %h z %h, expected %h %h", what, x, y, c, z,
                     mc[s][y * W + x], mz[s][y * W + x]);
        end
      end
    chk(bad == 0, $sformatf("%s: %0d words differ", what, bad));
  endtask

  int covered;
  initial begin
    model_clear(0);
    model_clear(1);
    build();
    exp_v = p.expected;
    $display("program: %0d words, %0d vertices and flushes", p.words.size(), exp_v.size());
    chk(p.words.size() <= 512, "program fits the instruction cache");
    repeat (4) @(negedge ct_clk);
    ct_rst = 0; raster_rst = 0; fbw_rst = 0;
    // load the program through the BRAM port (byte addresses, full-word writes)
    for (int i = 0; i < p.words.size(); i++) begin
      @(negedge ct_clk);
      BRAM_wen = 4'hf; BRAM_addr = i * 4; BRAM_din = p.words[i];
    end
    @(negedge ct_clk);
    BRAM_wen = 0;
    // the writer clears set 0 after reset (long finished by now, but wait for it)
    @(negedge fbw_clk);
    while (clearing) @(negedge fbw_clk);
    @(negedge ct_clk);
    start = 1;
    @(negedge ct_clk);
    start = 0;

    // frame 1 finished: set 0 on display
    wait (display_base == FB_BASE);
    check_set(0, "frame 1");
    covered = 0;
    for (int i = 0; i < W * H; i++) if (mz[0][i] != 0) covered++;
    $display("frame 1 covers %0d pixels", covered);
    chk(covered > 20000, "frame 1 draws a large object");
    // the writer switches sets and starts the clear once the display write is acknowledged
    repeat (4) @(negedge fbw_clk);
    chk(draw_buf == 1, "drawing moved to set 1");
    model_clear(0);

    // frame 2 finished: set 1 on display, set 0 cleared
    wait (display_base == (FB_BASE | (32'd1 << 22)));
    check_set(1, "frame 2");
    wait (done);
    repeat (4) @(negedge fbw_clk);
    chk(clearing, "clear started after the second swap");
    while (clearing) @(negedge fbw_clk);
    check_set(0, "set 0 after clear");
    chk(draw_buf == 0, "drawing moved back to set 0");
    chk(raster_idle, "rasterizer idle at the end");
    chk(exp_v.size() == 0, $sformatf("%0d vertices never left the transform", exp_v.size()));
    chk(exp_p.size() == 0, $sformatf("%0d expected pixels never came", exp_p.size()));
    chk(!stack_error, "no matrix stack error");
    chk(pix_flushes == 2, "two flush tokens reached the writer");
    chk(n_zrej == model_rejects, $sformatf("depth rejections %0d, model %0d", n_zrej,
                                           model_rejects));

    $display("mechanisms: vertex-fifo-full %0d, pixel-fifo-full %0d, depth-rejects %0d, swaps %0d,",
             n_vfull, n_pfull, n_zrej, pix_flushes);
    $display("  dma-clears %0d, push %0d, pop %0d, multiplies %0d, perspective %0d, prefetch-overlap %0d",
             dma_fills, n_push, n_pop, n_mult, n_persp, n_overlap);
    $display("  %0d vertices, %0d pixels", n_vtx, n_pix);
    chk(n_vfull > 0, "vertex/colour FIFO full never happened");
    chk(n_pfull > 0, "pixel FIFO full never happened");
    chk(n_zrej > 0, "depth test never rejected a pixel");
    chk(pix_flushes > 0, "no buffer swap");
    chk(dma_fills >= 3, "DMA clear after reset and after each swap");
    chk(n_push > 0 && n_pop > 0, "matrix push/pop never happened");
    chk(n_mult > 0, "matrix multiply never happened");
    chk(n_persp > 0, "perspective division by w != 1 never happened");
    chk(n_overlap > 0, "pre-fetch never held a triangle while the core was busy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
