// fbwriter_tb: the frame buffer writer against the bus/memory/DMA model. Three frames
// of random pixels, many landing on the same position with random depths, are sent
// with a flush after each. The testbench keeps the expected frame and z buffers:
// a pixel is kept when the location is empty or its z is smaller. After each frame's
// pixels it compares memory with the expectation; after each flush it checks that the
// display base points at the finished set and that the new drawing set has been
// zeroed by the DMA. Counts depth-test rejections, swaps and clears.
module fbwriter_tb;
  import gl_pkg::*;
  localparam logic [31:0] FB = 32'h9000_0000;
  logic clk = 0, rst = 1, pix_empty, pix_rd_en, bus_req, bus_we, bus_ack, draw_buf, clearing;
  logic [95:0] pix_rd_data;
  logic [31:0] bus_addr, bus_wdata, bus_rdata, display_base;
  int dma_fills;
  logic [95:0] pq [$];
  logic [31:0] exp_c [int], exp_z [int];
  int checks = 0, failures = 0, rejects = 0, kept = 0;

  fbwriter dut (.*);
  plb_mem_model mem (.clk, .bus_req, .bus_we, .bus_addr, .bus_wdata, .bus_rdata, .bus_ack,
                     .display_base, .dma_fills);

  always #5 clk = ~clk;

  // first-word-fall-through queue model; the read pointer moves with a
  // non-blocking update so the writer samples the word before it advances
  int pops = 0;
  assign pix_empty   = pops >= pq.size();
  assign pix_rd_data = pix_empty ? '0 : pq[pops];
  always @(posedge clk) if (!rst && pix_rd_en && !pix_empty) pops <= pops + 1;

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] addr(int set, int x, int y, bit z);
    return FB | (32'(set) << 22) | (32'(z) << 21) | (32'(y) << 12) | (32'(x) << 2);
  endfunction

  // wait until the queue is empty and the writer is idle, sampled between edges
  task automatic settle();
    do @(negedge clk); while (!pix_empty || dut.state != dut.W_IDLE);
  endtask

  task automatic frame(int set, int f);
    exp_c.delete(); exp_z.delete();
    for (int i = 0; i < 300; i++) begin
      pixel_t p;
      int key;
      p = '0;
      p.x = 10'(600 + $urandom % 40);
      p.y = 9'(440 + $urandom % 40);
      if (i % 3 == 0) begin p.x = 10'(f); p.y = 9'(f); end  // one hot spot
      p.red = 6'($urandom); p.green = 6'($urandom); p.blue = 6'($urandom);
      p.z = 32'h3c00_0000 + ($urandom % 32'h0300_0000);      // positive floats
      key = int'(p.y) * 1024 + int'(p.x);
      if (!exp_z.exists(key) || p.z < exp_z[key]) begin
        exp_z[key] = p.z; exp_c[key] = p[63:32]; kept++;
      end else rejects++;
      pq.push_back(p);
    end
    settle();
    foreach (exp_c[k]) begin
      chk(mem.peek(addr(set, k % 1024, k / 1024, 0)) == exp_c[k], $sformatf("colour at %0d,%0d got %h exp %h z %h/%h", k % 1024, k / 1024, mem.peek(addr(set, k % 1024, k / 1024, 0)), exp_c[k], mem.peek(addr(set, k % 1024, k / 1024, 1)), exp_z[k]));
      chk(mem.peek(addr(set, k % 1024, k / 1024, 1)) == exp_z[k], "depth");
    end
    // flush: show this set, clear the other
    pq.push_back(PIXEL_FLUSH);
    settle();
    chk(display_base == addr(set, 0, 0, 0), "display base after swap");
    chk(draw_buf == !set, "drawing set toggled");
    foreach (exp_c[k]) begin
      chk(mem.peek(addr(!set, k % 1024, k / 1024, 0)) == 0 && mem.peek(addr(!set, k % 1024, k / 1024, 1)) == 0,
          "new drawing set cleared");
      chk(mem.peek(addr(set, k % 1024, k / 1024, 0)) == exp_c[k], "shown set intact");
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    wait (!clearing);
    chk(dma_fills == 1, "clear after reset");
    chk(mem.peek(addr(0, 5, 5, 1)) == 0, "z buffer 0 cleared");
    frame(0, 1);
    frame(1, 2);
    frame(0, 3);
    chk(dma_fills == 4, $sformatf("%0d DMA clears", dma_fills));
    chk(rejects > 0 && kept > 0, "depth test both ways");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
