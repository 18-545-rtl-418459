// raster_bbox: bounding box of a triangle without floating point comparators.
//
// The half-function constants of the three edges already hold the coordinate
// differences d12 = v2 - v1, d23 = v3 - v2, d31 = v1 - v3 (for x and for y). Only
// their sign bits (and a zero test) are needed to pick the smallest and largest
// coordinate: e.g. x1 is the minimum when x2 - x1 >= 0 and x1 - x3 <= 0. The chosen
// float bounds are then turned into pixel bounds, rounding the minimum down and the
// maximum up (the smallest rectangle with integer corners that contains the
// triangle), clipped to the SCREEN_W x SCREEN_H screen. box_empty is high when the
// box lies entirely off screen. Combinational.
// Sign-bit selection follows the original design; the rounding and clipping are this
// design's choices.
module raster_bbox
  import gl_pkg::*;
#(
    parameter int SCREEN_W = 640,
    parameter int SCREEN_H = 480
) (
    input  vec3_t       v1,
    input  vec3_t       v2,
    input  vec3_t       v3,
    input  float_t      dx12,
    input  float_t      dx23,
    input  float_t      dx31,
    input  float_t      dy12,
    input  float_t      dy23,
    input  float_t      dy31,
    output logic [10:0] x_min,
    output logic [10:0] x_max,
    output logic [9:0]  y_min,
    output logic [9:0]  y_max,
    output logic        box_empty
);
  float_t fx_min, fx_max, fy_min, fy_max;
  logic signed [31:0] ix0, ix1, iy0, iy1;

  function automatic logic pos(float_t d);
    return !d[31] && !fp_is_zero(d);
  endfunction

  // a <= b for the three pairs, from the differences
  always_comb begin
    fx_min = (!fp_is_neg(dx12) && !pos(dx31)) ? v1.x : (!fp_is_neg(dx23) ? v2.x : v3.x);
    fx_max = (!pos(dx12) && !fp_is_neg(dx31)) ? v1.x : (!pos(dx23) ? v2.x : v3.x);
    fy_min = (!fp_is_neg(dy12) && !pos(dy31)) ? v1.y : (!fp_is_neg(dy23) ? v2.y : v3.y);
    fy_max = (!pos(dy12) && !fp_is_neg(dy31)) ? v1.y : (!pos(dy23) ? v2.y : v3.y);
    ix0 = fp_to_int(fx_min, 2'd1);
    ix1 = fp_to_int(fx_max, 2'd2);
    iy0 = fp_to_int(fy_min, 2'd1);
    iy1 = fp_to_int(fy_max, 2'd2);
    box_empty = (ix1 < 0) || (iy1 < 0) || (ix0 > SCREEN_W - 1) || (iy0 > SCREEN_H - 1);
    x_min = (ix0 < 0) ? '0 : 11'(ix0);
    y_min = (iy0 < 0) ? '0 : 10'(iy0);
    x_max = (ix1 > SCREEN_W - 1) ? 11'(SCREEN_W - 1) : 11'(ix1);
    y_max = (iy1 > SCREEN_H - 1) ? 10'(SCREEN_H - 1) : 10'(iy1);
  end
endmodule
