// raster_prefetch: the rasterizer's FIFO pre-fetch unit.
//
// The vertex and colour FIFOs deliver one 96-bit vertex and one 96-bit colour per
// read, but the rasterizer core works on whole triangles. This unit reads both
// FIFOs together (one vertex and its colour per cycle, whenever neither is empty)
// until it holds three, then raises tri_valid with vertex_1..3 and color_1..3. The
// core takes the set in a cycle where core_ready and tri_valid are both high and
// keeps its own copy, so the unit immediately starts fetching the next three while
// the core scans the current triangle.
// A vertex whose x is 0xFFFFFFFF is the flush marker: it completes the set at once
// (tri_flush high, earlier vertices of an incomplete triangle are dropped) so that
// the flush reaches the frame buffer writer in order.
// The prefetch-three-then-wait behaviour and the ready signals follow the original
// design; the flush handling and the valid/ready naming are this design's choices.
module raster_prefetch
  import gl_pkg::*;
(
    input  logic  clk,
    input  logic  rst,
    input  vec3_t vtx_rd_data,
    input  logic  vtx_empty,
    output logic  vtx_rd_en,
    input  vec3_t col_rd_data,
    input  logic  col_empty,
    output logic  col_rd_en,
    input  logic  core_ready,
    output logic  tri_valid,
    output logic  tri_flush,
    output vec3_t vertex_1,
    output vec3_t vertex_2,
    output vec3_t vertex_3,
    output vec3_t color_1,
    output vec3_t color_2,
    output vec3_t color_3
);
  logic [1:0] count;
  logic       rd;
  logic       is_flush;

  assign rd        = !tri_valid && !vtx_empty && !col_empty;
  assign vtx_rd_en = rd;
  assign col_rd_en = rd;
  assign is_flush  = (vtx_rd_data.x == FP_FLUSH);

  always_ff @(posedge clk) begin
    if (rst) begin
      count     <= '0;
      tri_valid <= 1'b0;
      tri_flush <= 1'b0;
      vertex_1  <= '0;
      vertex_2  <= '0;
      vertex_3  <= '0;
      color_1   <= '0;
      color_2   <= '0;
      color_3   <= '0;
    end else begin
      if (tri_valid && core_ready) tri_valid <= 1'b0;
      if (rd) begin
        if (is_flush) begin
          tri_valid <= 1'b1;
          tri_flush <= 1'b1;
          count     <= '0;
        end else begin
          tri_flush <= 1'b0;
          case (count)
            2'd0:    begin vertex_1 <= vtx_rd_data; color_1 <= col_rd_data; end
            2'd1:    begin vertex_2 <= vtx_rd_data; color_2 <= col_rd_data; end
            default: begin vertex_3 <= vtx_rd_data; color_3 <= col_rd_data; end
          endcase
          if (count == 2'd2) begin
            count     <= '0;
            tri_valid <= 1'b1;
          end else begin
            count <= count + 2'd1;
          end
        end
      end
    end
  end
endmodule
