// rasterizer: the rasterization unit, pre-fetch unit plus rasterizer core, in the
// rasterizer clock domain.
//
// It reads transformed vertices and their colours from the vertex and colour FIFOs
// (first-word-fall-through read side), three at a time, and writes one 96-bit word
// per covered pixel (and one all-ones word per flush) into the pixel FIFO towards the
// frame buffer writer. The pre-fetch unit gathers the next triangle while the core
// scans the current one. Structure follows the original design.
module rasterizer
  import gl_pkg::*;
#(
    parameter int SCREEN_W = 640,
    parameter int SCREEN_H = 480
) (
    input  logic        clk,
    input  logic        rst,
    input  vec3_t       vtx_rd_data,
    input  logic        vtx_empty,
    output logic        vtx_rd_en,
    input  vec3_t       col_rd_data,
    input  logic        col_empty,
    output logic        col_rd_en,
    output logic [95:0] pixel_data,
    output logic        pixel_wr,
    input  logic        pixel_full,
    output logic        idle
);
  logic  core_ready, tri_valid, tri_flush;
  vec3_t vertex_1, vertex_2, vertex_3, color_1, color_2, color_3;

  raster_prefetch u_prefetch (
      .clk, .rst, .vtx_rd_data, .vtx_empty, .vtx_rd_en, .col_rd_data, .col_empty, .col_rd_en,
      .core_ready, .tri_valid, .tri_flush, .vertex_1, .vertex_2, .vertex_3,
      .color_1, .color_2, .color_3);

  raster_core #(.SCREEN_W(SCREEN_W), .SCREEN_H(SCREEN_H)) u_core (
      .clk, .rst, .tri_valid, .tri_flush, .vertex_1, .vertex_2, .vertex_3,
      .color_1, .color_2, .color_3, .core_ready, .pixel_data, .pixel_wr, .pixel_full);

  assign idle = core_ready && !tri_valid && vtx_empty;
endmodule
