// raster_interp: per-pixel inside test and colour/depth interpolation.
//
// From the three half-function values at the pixel (f23, f31, f12) and their values
// at the opposite vertices (n23 = f23(v1), n31 = f31(v2), n12 = f12(v3)) it forms the
// barycentric coordinates alpha = f23/n23, beta = f31/n31, gamma = f12/n12. The pixel
// is inside the triangle when none of them is negative. Colour and depth are
// alpha*c1 + beta*c2 + gamma*c3 for red, green, blue and z. Each colour channel is
// scaled by 63 and truncated to 6 bits; z stays a float. The output word packs y, x,
// the 6-bit channels and z (see gl_pkg::pixel_t). Combinational: three dividers,
// twelve multipliers and eight adders plus the scaling.
// The barycentric formulation and the output fields follow the original design; the
// scale factor 63 (the full range of a 6-bit field) and the exact bit positions of
// the colour fields (laid out as a 32-bit display pixel word) are this design's
// reading of it.
module raster_interp
  import gl_pkg::*;
(
    input  float_t      f23,
    input  float_t      f31,
    input  float_t      f12,
    input  float_t      n23,
    input  float_t      n31,
    input  float_t      n12,
    input  vec3_t       c1,
    input  vec3_t       c2,
    input  vec3_t       c3,
    input  float_t      z1,
    input  float_t      z2,
    input  float_t      z3,
    input  logic [9:0]  px,
    input  logic [8:0]  py,
    output logic        in_tri,
    output pixel_t      pixel
);
  float_t alpha, beta, gamma;

  function automatic float_t interp(float_t a, float_t b, float_t c);
    return fp_add(fp_add(fp_mul(alpha, a), fp_mul(beta, b)), fp_mul(gamma, c));
  endfunction

  function automatic logic [5:0] chan(float_t v);
    logic signed [31:0] i;
    i = fp_to_int(fp_mul(v, FP_63), 2'd0);
    if (i < 0)  return 6'd0;
    if (i > 63) return 6'd63;
    return i[5:0];
  endfunction

  always_comb begin
    alpha  = fp_div(f23, n23);
    beta   = fp_div(f31, n31);
    gamma  = fp_div(f12, n12);
    in_tri = !fp_is_neg(alpha) && !fp_is_neg(beta) && !fp_is_neg(gamma);
    pixel       = '0;
    pixel.x     = px;
    pixel.y     = py;
    pixel.red   = chan(interp(c1.x, c2.x, c3.x));
    pixel.green = chan(interp(c1.y, c2.y, c3.y));
    pixel.blue  = chan(interp(c1.z, c2.z, c3.z));
    pixel.z     = interp(z1, z2, z3);
  end
endmodule
