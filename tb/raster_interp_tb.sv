// raster_interp_tb: random half-function values and normalizers of both signs; checks
// the inside flag against the signs of the real barycentric coordinates, and, for
// inside pixels, the 6-bit colours (within one step) and z against real arithmetic,
// plus the x/y fields and zero padding of the output word.
module raster_interp_tb;
  import gl_pkg::*;
  import fp_ref_pkg::*;
  float_t f23, f31, f12, n23, n31, n12, z1, z2, z3;
  vec3_t c1, c2, c3;
  logic [9:0] px;
  logic [8:0] py;
  logic in_tri;
  pixel_t pixel;
  int checks = 0, failures = 0, ins = 0, outs = 0;

  raster_interp dut (.*);

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  function automatic int ch(real v);
    int i;
    i = int'($floor(v * 63.0));
    return i < 0 ? 0 : (i > 63 ? 63 : i);
  endfunction

  function automatic bit near(int a, int b);
    return a - b <= 1 && b - a <= 1;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      real N, a, b, g, sa, sb, sg, r[3], gr[3], bl[3], z[3];
      // area N; a+b+g = 1 with each in [-0.25, 1]
      N = real'(1 + $urandom % 2000) * (($urandom % 2) ? 1.0 : -1.0);
      a = real'(int'($urandom % 1250) - 250) / 1000.0;
      b = real'(int'($urandom % 1250) - 250) / 1000.0;
      g = 1.0 - a - b;
      f23 = from_real(a * N); n23 = from_real(N);
      f31 = from_real(b * N); n31 = from_real(N);
      f12 = from_real(g * N); n12 = from_real(N);
      for (int i = 0; i < 3; i++) begin
        r[i] = real'($urandom % 256) / 256.0; gr[i] = real'($urandom % 256) / 256.0;
        bl[i] = real'($urandom % 256) / 256.0; z[i] = real'($urandom % 1000) / 1000.0;
      end
      c1 = '{from_real(r[0]), from_real(gr[0]), from_real(bl[0])};
      c2 = '{from_real(r[1]), from_real(gr[1]), from_real(bl[1])};
      c3 = '{from_real(r[2]), from_real(gr[2]), from_real(bl[2])};
      z1 = from_real(z[0]); z2 = from_real(z[1]); z3 = from_real(z[2]);
      px = 10'($urandom % 640); py = 9'($urandom % 480);
      #1;
      // use the values actually presented (after rounding to single)
      sa = to_real(f23) / to_real(n23); sb = to_real(f31) / to_real(n31); sg = to_real(f12) / to_real(n12);
      chk(in_tri == (sa >= 0 && sb >= 0 && sg >= 0), $sformatf("inside flag t=%0d", t));
      chk(pixel.x == px && pixel.y == py && pixel.pad_hi == 0 && pixel.pad_y == 0 && pixel.pad_c == 0 &&
          pixel.pad_r == 0 && pixel.pad_g == 0 && pixel.pad_b == 0, "position and padding");
      if (in_tri) begin
        real ez;
        ins++;
        ez = sa * z[0] + sb * z[1] + sg * z[2];
        chk(near(int'(pixel.red), ch(sa * r[0] + sb * r[1] + sg * r[2])) &&
            near(int'(pixel.green), ch(sa * gr[0] + sb * gr[1] + sg * gr[2])) &&
            near(int'(pixel.blue), ch(sa * bl[0] + sb * bl[1] + sg * bl[2])), $sformatf("colour t=%0d", t));
        chk(to_real(pixel.z) - ez < 1e-5 && ez - to_real(pixel.z) < 1e-5, $sformatf("z t=%0d", t));
      end else outs++;
    end
    chk(ins > 100 && outs > 100, "both inside and outside pixels");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
