// raster_core: triangle setup and horizontal scanline traversal.
//
// For the edge from vertex a to vertex b the half function is
//   f_ab(x, y) = (xb - xa) * (y - ya) - (yb - ya) * (x - xa)
// which is >= 0 on one side of the edge. The constants dx_ab = xb - xa and
// dy_ab = yb - ya are computed once per triangle; they also give the bounding box
// (raster_bbox). Stepping one pixel right changes f_ab by -dy_ab and one row down by
// +dx_ab, so after setup each pixel costs one floating point addition per edge.
//
// Sequence per triangle (one state per clock):
//   IDLE   core_ready high; takes a triangle from the pre-fetch unit
//   DIFF   edge constants dx/dy for edges 12, 23, 31
//   SETUP  bounding box; f23(v1), f31(v2), f12(v3) (the barycentric normalizers);
//          a triangle with zero area or off screen is dropped here
//   START  the three half functions at the top-left pixel of the box
//   SCAN   one pixel of the box per clock, left to right, top to bottom; inside
//          pixels are written to the pixel FIFO (the scan holds while it is full)
// A flush set from the pre-fetch unit is passed on as one all-ones pixel word.
// So a triangle takes 3 setup clocks plus one clock per pixel of its bounding box,
// plus stalls. The half functions, incremental stepping, bounding box and barycentric
// interpolation follow the original design. The original write-up's derivation
// states the x step as +constant_2; the sign used here is the one the definition of
// f_ab gives. The state split is this design's choice.
module raster_core
  import gl_pkg::*;
#(
    parameter int SCREEN_W = 640,
    parameter int SCREEN_H = 480
) (
    input  logic        clk,
    input  logic        rst,
    input  logic        tri_valid,
    input  logic        tri_flush,
    input  vec3_t       vertex_1,
    input  vec3_t       vertex_2,
    input  vec3_t       vertex_3,
    input  vec3_t       color_1,
    input  vec3_t       color_2,
    input  vec3_t       color_3,
    output logic        core_ready,
    output logic [95:0] pixel_data,
    output logic        pixel_wr,
    input  logic        pixel_full
);
  typedef enum logic [2:0] {C_IDLE, C_DIFF, C_SETUP, C_START, C_SCAN, C_FLUSH} cstate_e;

  cstate_e state;
  vec3_t   v1, v2, v3, c1, c2, c3;
  float_t  dx12, dx23, dx31, dy12, dy23, dy31;
  float_t  n23, n31, n12;
  float_t  f23, f31, f12, r23, r31, r12;
  logic [10:0] bx_min, bx_max, x_s, x_e, x;
  logic [9:0]  by_min, by_max, y_e, y;
  logic        box_empty, in_tri, hold;
  pixel_t      pix;
  float_t      fx, fy;

  // f_ab at (px, py) from the edge constants
  function automatic float_t half_fn(float_t dx, float_t dy, vec3_t a, float_t px, float_t py);
    return fp_sub(fp_mul(dx, fp_sub(py, a.y)), fp_mul(dy, fp_sub(px, a.x)));
  endfunction

  raster_bbox #(.SCREEN_W(SCREEN_W), .SCREEN_H(SCREEN_H)) u_bbox (
      .v1, .v2, .v3, .dx12, .dx23, .dx31, .dy12, .dy23, .dy31,
      .x_min(bx_min), .x_max(bx_max), .y_min(by_min), .y_max(by_max), .box_empty);

  raster_interp u_interp (
      .f23, .f31, .f12, .n23, .n31, .n12, .c1, .c2, .c3, .z1(v1.z), .z2(v2.z), .z3(v3.z),
      .px(x[9:0]), .py(y[8:0]), .in_tri, .pixel(pix));

  assign core_ready = (state == C_IDLE);
  assign hold       = in_tri && pixel_full;
  assign fx         = fp_from_int(32'(x_s));
  assign fy         = fp_from_int(32'(y));

  always_comb begin
    pixel_wr   = 1'b0;
    pixel_data = pix;
    if (state == C_SCAN) pixel_wr = in_tri && !pixel_full;
    if (state == C_FLUSH) begin
      pixel_wr   = !pixel_full;
      pixel_data = PIXEL_FLUSH;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= C_IDLE;
      {v1, v2, v3, c1, c2, c3} <= '0;
      {dx12, dx23, dx31, dy12, dy23, dy31} <= '0;
      {n23, n31, n12, f23, f31, f12, r23, r31, r12} <= '0;
      {x_s, x_e, x, y_e, y} <= '0;
    end else begin
      case (state)
        C_IDLE: if (tri_valid) begin
          v1 <= vertex_1; v2 <= vertex_2; v3 <= vertex_3;
          c1 <= color_1;  c2 <= color_2;  c3 <= color_3;
          state <= tri_flush ? C_FLUSH : C_DIFF;
        end
        C_DIFF: begin
          dx12 <= fp_sub(v2.x, v1.x); dy12 <= fp_sub(v2.y, v1.y);
          dx23 <= fp_sub(v3.x, v2.x); dy23 <= fp_sub(v3.y, v2.y);
          dx31 <= fp_sub(v1.x, v3.x); dy31 <= fp_sub(v1.y, v3.y);
          state <= C_SETUP;
        end
        C_SETUP: begin
          n23 <= half_fn(dx23, dy23, v2, v1.x, v1.y);
          n31 <= half_fn(dx31, dy31, v3, v2.x, v2.y);
          n12 <= half_fn(dx12, dy12, v1, v3.x, v3.y);
          x_s <= bx_min; x_e <= bx_max; x <= bx_min;
          y   <= by_min; y_e <= by_max;
          state <= box_empty ? C_IDLE : C_START;
        end
        C_START: begin
          f23 <= half_fn(dx23, dy23, v2, fx, fy); r23 <= half_fn(dx23, dy23, v2, fx, fy);
          f31 <= half_fn(dx31, dy31, v3, fx, fy); r31 <= half_fn(dx31, dy31, v3, fx, fy);
          f12 <= half_fn(dx12, dy12, v1, fx, fy); r12 <= half_fn(dx12, dy12, v1, fx, fy);
          // zero area: no pixel can be interpolated
          state <= (fp_is_zero(n23) || fp_is_zero(n31) || fp_is_zero(n12)) ? C_IDLE : C_SCAN;
        end
        C_SCAN: if (!hold) begin
          if (x != x_e) begin
            x   <= x + 11'd1;
            f23 <= fp_sub(f23, dy23);
            f31 <= fp_sub(f31, dy31);
            f12 <= fp_sub(f12, dy12);
          end else if (y != y_e) begin
            x   <= x_s;
            y   <= y + 10'd1;
            r23 <= fp_add(r23, dx23); f23 <= fp_add(r23, dx23);
            r31 <= fp_add(r31, dx31); f31 <= fp_add(r31, dx31);
            r12 <= fp_add(r12, dx12); f12 <= fp_add(r12, dx12);
          end else begin
            state <= C_IDLE;
          end
        end
        C_FLUSH: if (!pixel_full) state <= C_IDLE;
        default: state <= C_IDLE;
      endcase
    end
  end
endmodule
