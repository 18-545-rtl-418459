// viewport_tb: maps the corners and centre of the normalized cube and random points
// through a 640x480 viewport and through random viewports, with expected values
// computed in real arithmetic from the viewport formula (depth range 0..1).
module viewport_tb;
  import gl_pkg::*;
  import fp_ref_pkg::*;
  vec3_t  ndc, win;
  float_t vp_x, vp_y, vp_hw, vp_hh;
  int checks = 0, failures = 0;

  viewport dut (.*);

  task automatic chk(float_t got, real e, string what);
    checks++;
    if (got !== from_real(e) && !(e == 0.0 && got[30:0] == 0)) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %h (%f) expected %f", what, got, to_real(got), e);
    end
  endtask

  task automatic run(real x, real y, real w, real h, real nx, real ny, real nz);
    vp_x = from_real(x); vp_y = from_real(y); vp_hw = from_real(w / 2); vp_hh = from_real(h / 2);
    ndc.x = from_real(nx); ndc.y = from_real(ny); ndc.z = from_real(nz);
    #1;
    chk(win.x, w / 2 * nx + (x + w / 2), "xw");
    chk(win.y, h / 2 * ny + (y + h / 2), "yw");
    chk(win.z, 0.5 * nz + 0.5, "zw");
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    run(0, 0, 640, 480, -1, -1, -1);
    run(0, 0, 640, 480, 1, 1, 1);
    run(0, 0, 640, 480, 0, 0, 0);
    run(0, 0, 640, 480, 0.5, -0.25, 0.75);
    for (int t = 0; t < 500; t++)
      run(real'($urandom % 100), real'($urandom % 100), real'($urandom % 512), real'($urandom % 512),
          real'(int'($urandom % 257) - 128) / 128.0, real'(int'($urandom % 257) - 128) / 128.0,
          real'(int'($urandom % 257) - 128) / 128.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
