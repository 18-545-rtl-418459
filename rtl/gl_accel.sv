// gl_accel: the OpenGL fixed-function pipeline, from an instruction program to
// pixels in a double-buffered frame buffer.
//
// Three clock domains are joined by dual-clock FIFOs:
//   ct_clk      coordinate transform: runs the program held in the instruction
//               cache (loaded through the BRAM_* port) and emits one screen-space
//               vertex plus its colour per glVertex, and a flush marker per glFlush;
//   raster_clk  rasterizer: gathers three vertices, walks the triangle's bounding
//               box and emits one 96-bit word per covered pixel;
//   fbw_clk     frame buffer writer: depth test and writes over the processor bus,
//               buffer swap and DMA clear on each flush.
// The vertex and colour FIFOs are written together (one fifo_wr) and read together;
// the coordinate transform stalls while either is full, the rasterizer stalls while
// the pixel FIFO is full. The bus_* port is the writer's bus master port (memory,
// DMA engine and display controller sit behind it, outside this design).
// Each domain has its own synchronous reset; hold all three together at start-up.
// The split into these units, the three FIFOs and the clock domains follow the
// original design; the FIFO depth (16) and the reset scheme are this design's
// choices.
module gl_accel
  import gl_pkg::*;
#(
    parameter int          ICACHE_DEPTH = 512,
    parameter int          STACK_DEPTH  = 16,
    parameter int          FIFO_DEPTH   = 16,
    parameter int          SCREEN_W     = 640,
    parameter int          SCREEN_H     = 480,
    parameter logic [31:0] FB_BASE      = 32'h9000_0000,
    parameter logic [31:0] TFT_BASE_REG = 32'h8620_0000,
    parameter logic [31:0] DMA_BASE     = 32'h8400_0000
) (
    // coordinate transform domain
    input  logic        ct_clk,
    input  logic        ct_rst,
    input  logic        BRAM_rst,
    input  logic [3:0]  BRAM_wen,
    input  logic [31:0] BRAM_addr,
    input  logic [31:0] BRAM_din,
    output logic [31:0] BRAM_dout,
    input  logic        start,
    output logic        running,
    output logic        done,
    output logic        stack_error,
    // rasterizer domain
    input  logic        raster_clk,
    input  logic        raster_rst,
    output logic        raster_idle,
    // frame buffer writer domain
    input  logic        fbw_clk,
    input  logic        fbw_rst,
    output logic        bus_req,
    output logic        bus_we,
    output logic [31:0] bus_addr,
    output logic [31:0] bus_wdata,
    input  logic [31:0] bus_rdata,
    input  logic        bus_ack,
    output logic        draw_buf,
    output logic        clearing
);
  vec3_t       vtx_wdata, col_wdata, vtx_rdata, col_rdata;
  logic        fifo_wr, vtx_full, col_full, vtx_empty, col_empty, vtx_rd_en, col_rd_en;
  logic [95:0] pix_wdata, pix_rdata;
  logic        pix_wr, pix_full, pix_empty, pix_rd_en;

  coord_transform #(
      .ICACHE_DEPTH(ICACHE_DEPTH),
      .STACK_DEPTH (STACK_DEPTH)
  ) u_ct (
      .clk        (ct_clk),
      .rst        (ct_rst),
      .BRAM_rst   (BRAM_rst),
      .BRAM_wen   (BRAM_wen),
      .BRAM_addr  (BRAM_addr),
      .BRAM_din   (BRAM_din),
      .BRAM_dout  (BRAM_dout),
      .start      (start),
      .running    (running),
      .done       (done),
      .vtx_data   (vtx_wdata),
      .color_data (col_wdata),
      .fifo_wr    (fifo_wr),
      .vtx_full   (vtx_full),
      .color_full (col_full),
      .stack_error(stack_error)
  );

  async_fifo #(.WIDTH(96), .DEPTH(FIFO_DEPTH)) u_vtx_fifo (
      .wr_clk (ct_clk),
      .wr_rst (ct_rst),
      .wr_en  (fifo_wr),
      .wr_data(vtx_wdata),
      .full   (vtx_full),
      .rd_clk (raster_clk),
      .rd_rst (raster_rst),
      .rd_en  (vtx_rd_en),
      .rd_data(vtx_rdata),
      .empty  (vtx_empty)
  );

  async_fifo #(.WIDTH(96), .DEPTH(FIFO_DEPTH)) u_col_fifo (
      .wr_clk (ct_clk),
      .wr_rst (ct_rst),
      .wr_en  (fifo_wr),
      .wr_data(col_wdata),
      .full   (col_full),
      .rd_clk (raster_clk),
      .rd_rst (raster_rst),
      .rd_en  (col_rd_en),
      .rd_data(col_rdata),
      .empty  (col_empty)
  );

  rasterizer #(
      .SCREEN_W(SCREEN_W),
      .SCREEN_H(SCREEN_H)
  ) u_raster (
      .clk        (raster_clk),
      .rst        (raster_rst),
      .vtx_rd_data(vtx_rdata),
      .vtx_empty  (vtx_empty),
      .vtx_rd_en  (vtx_rd_en),
      .col_rd_data(col_rdata),
      .col_empty  (col_empty),
      .col_rd_en  (col_rd_en),
      .pixel_data (pix_wdata),
      .pixel_wr   (pix_wr),
      .pixel_full (pix_full),
      .idle       (raster_idle)
  );

  async_fifo #(.WIDTH(96), .DEPTH(FIFO_DEPTH)) u_pix_fifo (
      .wr_clk (raster_clk),
      .wr_rst (raster_rst),
      .wr_en  (pix_wr),
      .wr_data(pix_wdata),
      .full   (pix_full),
      .rd_clk (fbw_clk),
      .rd_rst (fbw_rst),
      .rd_en  (pix_rd_en),
      .rd_data(pix_rdata),
      .empty  (pix_empty)
  );

  fbwriter #(
      .FB_BASE     (FB_BASE),
      .TFT_BASE_REG(TFT_BASE_REG),
      .DMA_BASE    (DMA_BASE)
  ) u_fbw (
      .clk        (fbw_clk),
      .rst        (fbw_rst),
      .pix_rd_data(pix_rdata),
      .pix_empty  (pix_empty),
      .pix_rd_en  (pix_rd_en),
      .bus_req    (bus_req),
      .bus_we     (bus_we),
      .bus_addr   (bus_addr),
      .bus_wdata  (bus_wdata),
      .bus_rdata  (bus_rdata),
      .bus_ack    (bus_ack),
      .draw_buf   (draw_buf),
      .clearing   (clearing)
  );

endmodule
