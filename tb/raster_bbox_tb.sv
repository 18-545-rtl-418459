// raster_bbox_tb: random triangles with fractional corners (including coincident
// coordinates and negative or off-screen values); the differences are computed in the
// testbench and the pixel bounds compared with floor/ceil of the real minimum and
// maximum, clipped to the screen, and with the off-screen flag.
module raster_bbox_tb;
  import gl_pkg::*;
  import fp_ref_pkg::*;
  import raster_ref_pkg::*;
  vec3_t v1, v2, v3;
  float_t dx12, dx23, dx31, dy12, dy23, dy31;
  logic [10:0] x_min, x_max;
  logic [9:0] y_min, y_max;
  logic box_empty;
  int checks = 0, failures = 0, empties = 0;

  raster_bbox dut (.*);

  function automatic real rc(int lo, int span);
    // quarter-pixel grid; sometimes repeat a value
    return real'(lo) + real'($urandom % (span * 4)) / 4.0;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      real x[3], y[3];
      int ex0, ex1, ey0, ey1;
      bit em;
      for (int i = 0; i < 3; i++) begin
        x[i] = (t % 5 == 0) ? rc(-50, 800) : rc(0, 40);
        y[i] = (t % 5 == 0) ? rc(-50, 600) : rc(0, 40);
      end
      if (t % 7 == 0) x[2] = x[0];
      if (t % 11 == 0) y[1] = y[2];
      v1 = '{from_real(x[0]), from_real(y[0]), FP_ZERO};
      v2 = '{from_real(x[1]), from_real(y[1]), FP_ZERO};
      v3 = '{from_real(x[2]), from_real(y[2]), FP_ZERO};
      dx12 = from_real(x[1] - x[0]); dx23 = from_real(x[2] - x[1]); dx31 = from_real(x[0] - x[2]);
      dy12 = from_real(y[1] - y[0]); dy23 = from_real(y[2] - y[1]); dy31 = from_real(y[0] - y[2]);
      #1;
      ex0 = int'($floor(fmin3(x[0], x[1], x[2]))); ex1 = int'($ceil(fmax3(x[0], x[1], x[2])));
      ey0 = int'($floor(fmin3(y[0], y[1], y[2]))); ey1 = int'($ceil(fmax3(y[0], y[1], y[2])));
      em = ex1 < 0 || ey1 < 0 || ex0 > 639 || ey0 > 479;
      checks++;
      if (box_empty != em) begin
        failures++;
        if (failures < 10) $display("FAIL empty flag t=%0d", t);
      end
      if (em) empties++;
      else begin
        if (ex0 < 0) ex0 = 0;
        if (ey0 < 0) ey0 = 0;
        if (ex1 > 639) ex1 = 639;
        if (ey1 > 479) ey1 = 479;
        checks++;
        if (int'(x_min) != ex0 || int'(x_max) != ex1 || int'(y_min) != ey0 || int'(y_max) != ey1) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d box %0d..%0d %0d..%0d expected %0d..%0d %0d..%0d", t,
                                      x_min, x_max, y_min, y_max, ex0, ex1, ey0, ey1);
        end
      end
    end
    checks++;
    if (empties == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
