// raster_core_tb: hands triangles straight to the rasterizer core and compares the
// pixel words it writes, in order, with the reference rasterizer (position exact,
// colour within one 6-bit step, z within 1e-4). Random triangles of both windings,
// triangles crossing the screen edge, a zero-area and an off-screen triangle, and a
// flush. Checks the timing: 3 setup cycles plus one cycle per bounding-box pixel
// with the pixel FIFO free, and that random FIFO-full stalls lose no pixel.
module raster_core_tb;
  import gl_pkg::*;
  import fp_ref_pkg::*;
  import raster_ref_pkg::*;
  logic clk = 0, rst = 1, tri_valid = 0, tri_flush = 0, core_ready, pixel_wr, pixel_full = 0;
  vec3_t vertex_1, vertex_2, vertex_3, color_1, color_2, color_3;
  logic [95:0] pixel_data;
  rpix_t exp_q [$];
  int checks = 0, failures = 0, busy_cycles, stalls = 0, flushes = 0;
  bit stall_mode = 0;

  raster_core dut (.*);

  always #5 clk = ~clk;

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst) begin
    if (pixel_full) stalls++;
    if (pixel_wr) begin
      if (pixel_data == '1) flushes++;
      else begin
        chk(exp_q.size() > 0, "unexpected pixel");
        if (exp_q.size() > 0) begin
          rpix_t e;
          e = exp_q.pop_front();
          chk(pix_match(pixel_data, e), $sformatf("pixel (%0d,%0d) rgb %0d %0d %0d got x=%0d y=%0d rgb %0d %0d %0d",
              e.x, e.y, e.r, e.g, e.b, pixel_data[73:64], pixel_data[88:80], pixel_data[55:50],
              pixel_data[47:42], pixel_data[39:34]));
        end
      end
    end
  end

  always @(negedge clk) pixel_full <= stall_mode && ($urandom % 3 == 0);

  task automatic send(rtri_t t, int exp_cycles);
    int area;
    vertex_1 = '{from_real(t.x[0]), from_real(t.y[0]), from_real(t.z[0])};
    vertex_2 = '{from_real(t.x[1]), from_real(t.y[1]), from_real(t.z[1])};
    vertex_3 = '{from_real(t.x[2]), from_real(t.y[2]), from_real(t.z[2])};
    color_1  = '{from_real(t.r[0]), from_real(t.g[0]), from_real(t.b[0])};
    color_2  = '{from_real(t.r[1]), from_real(t.g[1]), from_real(t.b[1])};
    color_3  = '{from_real(t.r[2]), from_real(t.g[2]), from_real(t.b[2])};
    area = raster(t, exp_q);
    while (!core_ready) @(negedge clk);
    tri_valid = 1;
    @(negedge clk);
    tri_valid = 0;
    busy_cycles = 0;
    while (!core_ready) begin
      busy_cycles++;
      @(negedge clk);
    end
    if (exp_cycles >= 0) chk(busy_cycles == exp_cycles, $sformatf("busy %0d cycles, expected %0d", busy_cycles, exp_cycles));
    else if (!stall_mode) chk(busy_cycles == 3 + area, $sformatf("busy %0d cycles, box %0d", busy_cycles, area));
    chk(exp_q.size() == 0, $sformatf("%0d pixels missing", exp_q.size()));
    exp_q.delete();
  endtask

  initial begin
    rtri_t t;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 40; i++) send(rand_tri(0, 0, 60, 40), -1);
    // crossing the right and bottom screen edges
    for (int i = 0; i < 5; i++) send(rand_tri(600, 450, 80, 60), -1);
    // zero area: three points on a line; off screen
    t = rand_tri(0, 0, 10, 10);
    t.x = '{1.0, 5.0, 9.0}; t.y = '{2.0, 4.0, 6.0};
    send(t, 3);
    t.x = '{700.0, 710.0, 720.0}; t.y = '{5.0, 30.0, 9.0};
    send(t, 2);
    stall_mode = 1;
    for (int i = 0; i < 20; i++) send(rand_tri(100, 100, 50, 50), -1);
    stall_mode = 0;
    // flush
    tri_flush = 1; tri_valid = 1;
    @(negedge clk);
    tri_valid = 0; tri_flush = 0;
    repeat (3) @(negedge clk);
    chk(flushes == 1, "flush token written");
    chk(stalls > 0, "stalls exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
