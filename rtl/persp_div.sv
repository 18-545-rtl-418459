// persp_div: perspective division, clip coordinates to normalized device coordinates.
//
// ndc = (x_clip / w_clip, y_clip / w_clip, z_clip / w_clip) with three floating point
// dividers, combinational. clip is a homogeneous vector, clip[0..3] = x, y, z, w.
// The formula follows the original design; the zero-latency dividers are this
// design's choice.
module persp_div
  import gl_pkg::*;
(
    input  vec4_t clip,
    output vec3_t ndc
);
  fp_div u_dx (.a(clip[0]), .b(clip[3]), .y(ndc.x));
  fp_div u_dy (.a(clip[1]), .b(clip[3]), .y(ndc.y));
  fp_div u_dz (.a(clip[2]), .b(clip[3]), .y(ndc.z));
endmodule
