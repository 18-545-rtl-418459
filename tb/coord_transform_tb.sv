// coord_transform_tb: loads a program through the BRAM port and runs it: viewport,
// a perspective projection loaded with glLoadMatrix, modelview built from
// glTranslate, glScale, glMultMatrix (a rotation) and push/pop, colour changes,
// vertices and a flush. Every vertex and colour written to the FIFOs is compared
// with the double-precision model in gl_prog_pkg. Also checked: 34 cycles per
// glVertex (32 multiply cycles, issue and push), no FIFO write while a FIFO reports
// full (full is held high for stretches in the second half), the flush marker and
// the end of the program.
module coord_transform_tb;
  import gl_pkg::*;
  import fp_ref_pkg::*;
  import gl_prog_pkg::*;

  logic clk = 0, rst = 1, BRAM_rst = 0, start = 0;
  logic [3:0] BRAM_wen = 0;
  logic [31:0] BRAM_addr = 0, BRAM_din = 0, BRAM_dout;
  logic running, done, fifo_wr, vtx_full = 0, color_full = 0, stack_error;
  vec3_t vtx_data, color_data;
  gl_prog p;
  int checks = 0, failures = 0, nout = 0, cyc = 0, full_cycles = 0;
  int stamps [$];

  coord_transform dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // FIFO side: compare every write with the model
  always @(posedge clk) if (!rst) begin
    chk(!(fifo_wr && (vtx_full || color_full)), "write while full");
    if (vtx_full || color_full) full_cycles++;
    if (fifo_wr) begin
      vtx_t e;
      e = p.expected[nout];
      stamps.push_back(cyc);
      if (e.flush) chk(vtx_data == {3{FP_FLUSH}}, "flush marker");
      else begin
        chk(close(vtx_data.x, e.x) && close(vtx_data.y, e.y) && close(vtx_data.z, e.z),
            $sformatf("vertex %0d got (%f %f %f) expected (%f %f %f)", nout, to_real(vtx_data.x),
                      to_real(vtx_data.y), to_real(vtx_data.z), e.x, e.y, e.z));
        chk(color_data.x == from_real(e.r) && color_data.y == from_real(e.g) &&
            color_data.z == from_real(e.b), $sformatf("colour %0d", nout));
      end
      nout++;
    end
  end

  // stall the pipeline with FIFO-full for stretches after the first triangle
  always @(negedge clk) begin
    if (nout >= 3) begin
      vtx_full   <= ($urandom % 4 == 0);
      color_full <= ($urandom % 6 == 0);
    end
  end

  initial begin
    mat_t fr, rot;
    real c, s;
    p = new();
    // perspective frustum l=-1 r=1 b=-1 t=1 n=1 f=10, as software computes it
    fr = '{default: 0.0};
    fr[0][0] = 1.0; fr[1][1] = 1.0; fr[2][2] = -11.0 / 9.0; fr[2][3] = -20.0 / 9.0; fr[3][2] = -1.0;
    c = $cos(0.5); s = $sin(0.5);
    rot = gl_prog::ident();
    rot[0][0] = c; rot[0][1] = -s; rot[1][0] = s; rot[1][1] = c;
    p.viewport(0, 0, 640, 480);
    p.matrix_mode(1);
    p.load_identity();
    p.load_matrix(fr);
    p.matrix_mode(0);
    p.load_identity();
    p.translate(0.5, -0.25, -4.0);
    p.gl_begin();
    p.color(1.0, 0.0, 0.0);
    p.vertex(-1.0, -1.0, 0.0);
    p.vertex(1.0, -1.0, 0.5);
    p.vertex(0.0, 1.0, -0.5);
    p.push();
    p.scale(2.0, 0.5, 1.5);
    p.mult_matrix(rot);
    p.color(0.0, 1.0, 0.25);
    p.vertex(0.3, 0.2, 0.1);
    p.vertex(-0.7, 0.4, 0.0);
    p.color(0.5, 0.5, 1.0);
    p.vertex(0.1, -0.9, 0.2);
    p.pop();
    p.vertex(0.25, 0.25, 0.25);
    p.matrix_mode(1);
    p.push();
    p.load_identity();
    p.matrix_mode(0);
    p.vertex(0.5, 0.5, 0.5);
    p.matrix_mode(1);
    p.pop();
    p.matrix_mode(0);
    p.vertex(-0.5, 0.5, 1.0);
    p.gl_end();
    p.flush();
    p.finish();

    repeat (3) @(negedge clk);
    rst = 0;
    foreach (p.words[i]) begin
      BRAM_wen = 4'hf; BRAM_addr = i * 4; BRAM_din = p.words[i];
      @(negedge clk);
    end
    BRAM_wen = 0;
    start = 1;
    @(negedge clk);
    start = 0;
    wait (done);
    @(negedge clk);
    chk(nout == p.expected.size(), $sformatf("%0d FIFO writes, expected %0d", nout, p.expected.size()));
    chk(stamps.size() >= 3 && stamps[1] - stamps[0] == 34 && stamps[2] - stamps[1] == 34,
        "34 cycles per glVertex");
    chk(full_cycles > 0, "FIFO-full stall exercised");
    chk(!stack_error, "no stack error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
