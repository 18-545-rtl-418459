// rasterizer_tb: streams 30 random triangles and a flush through FIFO models into the
// rasterizer and compares the pixel words with the reference rasterizer. With the
// pixel FIFO free, the core must take the next triangle as soon as it is idle (the
// pre-fetch unit has it ready), so the whole stream takes at most one accept cycle,
// 3 setup cycles and one cycle per bounding-box pixel for each triangle, plus the
// initial fill. A second pass repeats this with random pixel-FIFO-full stalls.
module rasterizer_tb;
  import gl_pkg::*;
  import fp_ref_pkg::*;
  import raster_ref_pkg::*;
  logic clk = 0, rst = 1, vtx_rd_en, col_rd_en, pixel_wr, pixel_full = 0, idle;
  logic vtx_empty, col_empty;
  vec3_t vtx_rd_data, col_rd_data;
  logic [95:0] pixel_data;
  vec3_t vq [$], cq [$];
  rpix_t exp_q [$];
  int checks = 0, failures = 0, flushes = 0, budget, cycles;
  bit stall_mode = 0;

  rasterizer dut (.*);

  always #5 clk = ~clk;

  // first-word-fall-through FIFO models; the read pointer moves with a
  // non-blocking update so the design samples the word before it advances
  int pops = 0;
  assign vtx_empty   = pops >= vq.size();
  assign col_empty   = pops >= cq.size();
  assign vtx_rd_data = vtx_empty ? '0 : vq[pops];
  assign col_rd_data = col_empty ? '0 : cq[pops];

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst) begin
    if (vtx_rd_en && !vtx_empty) pops <= pops + 1;
    if (pixel_wr) begin
      if (pixel_data == '1) flushes++;
      else begin
        rpix_t e;
        chk(exp_q.size() > 0, "unexpected pixel");
        e = exp_q.pop_front();
        chk(pix_match(pixel_data, e), $sformatf("pixel (%0d,%0d)", e.x, e.y));
      end
    end
  end

  always @(negedge clk) pixel_full <= stall_mode && ($urandom % 3 == 0);

  task automatic stream();
    budget = 10;
    for (int n = 0; n < 30; n++) begin
      rtri_t t;
      t = rand_tri(20 * n, 10 * n, 40, 30);
      budget += 4 + raster(t, exp_q);
      for (int i = 0; i < 3; i++) begin
        vq.push_back('{from_real(t.x[i]), from_real(t.y[i]), from_real(t.z[i])});
        cq.push_back('{from_real(t.r[i]), from_real(t.g[i]), from_real(t.b[i])});
      end
    end
    vq.push_back('{FP_FLUSH, FP_FLUSH, FP_FLUSH});
    cq.push_back('0);
    cycles = 0;
    @(negedge clk);
    while (!(idle && vtx_empty)) begin
      @(negedge clk);
      cycles++;
    end
    repeat (2) @(negedge clk);
    chk(exp_q.size() == 0, $sformatf("%0d pixels missing", exp_q.size()));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    stream();
    chk(cycles <= budget, $sformatf("took %0d cycles, budget %0d", cycles, budget));
    stall_mode = 1;
    stream();
    chk(flushes == 2, "flush tokens");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
