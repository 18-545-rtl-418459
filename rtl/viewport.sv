// viewport: viewport transformation, normalized device coordinates to window
// coordinates.
//   xw = (w/2) * x_ndc + (x + w/2)
//   yw = (h/2) * y_ndc + (y + h/2)
//   zw = ((f-n)/2) * z_ndc + (f+n)/2
// The viewport origin (vp_x, vp_y) and half size (vp_hw = w/2, vp_hh = h/2) arrive as
// floats from the decode unit's viewport register. Three floating point multipliers
// and five adders (two for the offsets x + w/2 and y + h/2, three for the sums),
// combinational. The formula and unit count follow the original design. The
// instruction set has no depth-range call, so n = 0 and f = 1 are fixed as the
// parameters DEPTH_HALF and DEPTH_MID ((f-n)/2 and (f+n)/2); that is this design's
// reading of it.
module viewport
  import gl_pkg::*;
#(
    parameter float_t DEPTH_HALF = FP_HALF,
    parameter float_t DEPTH_MID  = FP_HALF
) (
    input  vec3_t  ndc,
    input  float_t vp_x,
    input  float_t vp_y,
    input  float_t vp_hw,
    input  float_t vp_hh,
    output vec3_t  win
);
  float_t mx, my, mz, ox, oy;

  fp_mul u_mx (.a(vp_hw), .b(ndc.x), .y(mx));
  fp_mul u_my (.a(vp_hh), .b(ndc.y), .y(my));
  fp_mul u_mz (.a(DEPTH_HALF), .b(ndc.z), .y(mz));
  fp_add u_ox (.a(vp_x), .b(vp_hw), .sub(1'b0), .y(ox));
  fp_add u_oy (.a(vp_y), .b(vp_hh), .sub(1'b0), .y(oy));
  fp_add u_sx (.a(mx), .b(ox), .sub(1'b0), .y(win.x));
  fp_add u_sy (.a(my), .b(oy), .sub(1'b0), .y(win.y));
  fp_add u_sz (.a(mz), .b(DEPTH_MID), .sub(1'b0), .y(win.z));
endmodule
