// raster_prefetch_tb: feeds numbered vertices and colours through first-word-fall-
// through FIFO models that go empty at random, with a core model whose ready signal
// is random. Every set taken by the core must be the next three vertices with their
// colours; a flush marker must arrive alone, in order, dropping the partial triangle
// before it. Also counts sets that were complete while the core was still busy
// (prefetch overlapping the scan).
module raster_prefetch_tb;
  import gl_pkg::*;
  logic clk = 0, rst = 1, vtx_rd_en, col_rd_en, core_ready = 0, tri_valid, tri_flush;
  logic vtx_empty, col_empty;
  vec3_t vtx_rd_data, col_rd_data, vertex_1, vertex_2, vertex_3, color_1, color_2, color_3;
  vec3_t vq [$], cq [$];
  int checks = 0, failures = 0, next_id = 0, sets = 0, overlapped = 0, flushes = 0;
  bit gate;

  raster_prefetch dut (.*);

  always #5 clk = ~clk;

  // first-word-fall-through FIFO models that go empty at random; the read pointer
  // moves with a non-blocking update so the design samples the word before it
  // advances
  int pops = 0;
  assign vtx_empty   = (pops >= vq.size()) || !gate;
  assign col_empty   = (pops >= cq.size()) || !gate;
  assign vtx_rd_data = (pops < vq.size()) ? vq[pops] : '0;
  assign col_rd_data = (pops < cq.size()) ? cq[pops] : '0;

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  function automatic vec3_t vid(int i);
    return '{32'(i), 32'(i + 1000), 32'(i + 2000)};
  endfunction
  function automatic vec3_t cid(int i);
    return '{32'(i + 5000), 32'(i + 6000), 32'(i + 7000)};
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst) begin
    chk(vtx_rd_en == col_rd_en, "both FIFOs read together");
    if (vtx_rd_en && !vtx_empty) pops <= pops + 1;
    if (tri_valid && !core_ready) overlapped++;
    if (tri_valid && core_ready) begin
      if (tri_flush) begin
        chk(next_id < 0, "flush in order");
        next_id = -next_id;
        flushes++;
      end else begin
        chk(vertex_1 == vid(next_id) && vertex_2 == vid(next_id + 1) && vertex_3 == vid(next_id + 2) &&
            color_1 == cid(next_id) && color_2 == cid(next_id + 1) && color_3 == cid(next_id + 2),
            $sformatf("set starting at %0d", next_id));
        next_id += 3;
        sets++;
      end
    end
  end

  always @(negedge clk) begin
    gate       <= ($urandom % 4 != 0);
    core_ready <= ($urandom % 5 == 0);
  end

  initial begin
    int id;
    id = 0;
    for (int tri_n = 0; tri_n < 200; tri_n++) begin
      for (int k = 0; k < 3; k++) begin
        vq.push_back(vid(id + k));
        cq.push_back(cid(id + k));
      end
      id += 3;
      if (tri_n % 50 == 49) begin
        // one stray vertex, then a flush marker: the stray vertex is dropped
        vq.push_back(vid(999999)); cq.push_back(cid(999999));
        vq.push_back('{FP_FLUSH, FP_FLUSH, FP_FLUSH}); cq.push_back(cid(0));
      end
    end
    repeat (3) @(negedge clk);
    rst = 0;
    // the expected id goes negative just before each flush
    fork
      begin
        for (int f = 0; f < 4; f++) begin
          wait (next_id == 150 * (f + 1));
          next_id = -next_id;
          wait (next_id > 0);
        end
      end
    join_none
    wait (sets == 200 && flushes == 4);
    chk(overlapped > 0, "prefetch overlapped with busy core");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
