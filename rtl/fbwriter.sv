// fbwriter: frame buffer writer with depth test, double buffering and DMA flush.
//
// Memory layout (all regions 2 MB and 2 MB aligned, starting at FB_BASE):
//   FB_BASE + 0 MB  frame buffer 0      FB_BASE + 2 MB  z buffer 0
//   FB_BASE + 4 MB  frame buffer 1      FB_BASE + 6 MB  z buffer 1
// A pixel (x, y) of a buffer is the 32-bit word at base + y*4096 + x*4 (1024-pixel
// line pitch, as the display controller reads it). Setting address bit ZBUF_BIT moves
// from a frame buffer to its z buffer; bit BUF_BIT selects the buffer set.
//
// For each pixel word taken from the pixel FIFO it reads the stored depth, and if
// the stored word is 0 (cleared) or the new z is smaller (nearer), writes the new z
// and then the colour word (bits 63:32 of the pixel word). Depths are non-negative
// floats, so they are compared as unsigned integers. An all-ones word is a flush: the
// writer points the display controller at the set just drawn (one write to its base
// address register TFT_BASE_REG) and then makes the other set the drawing target and
// has the DMA engine zero it (frame and z buffer together, CLEAR_BYTES, which are
// contiguous), polling the DMA status until it is idle. The same clear runs after
// reset for set 0.
//
// Bus master port: one transfer at a time; bus_req with bus_we/bus_addr/bus_wdata
// stays stable until the cycle bus_ack is high; read data is valid with bus_ack.
// DMA registers (relative to DMA_BASE): 0x0 destination, 0x4 length in bytes (the
// write starts the fill), 0x8 status (bit 0 busy).
// The layout, the bit flips between buffers, the z test on the writer side, the
// swap-with-flush and the DMA clear follow the original design. The register
// addresses, the DMA register map, the depth convention (0 = empty, smaller = nearer)
// and waiting for the clear to finish are this design's choices.
module fbwriter
  import gl_pkg::*;
#(
    parameter logic [31:0] FB_BASE      = 32'h9000_0000,
    parameter int          ZBUF_BIT     = 21,
    parameter int          BUF_BIT      = 22,
    parameter logic [31:0] TFT_BASE_REG = 32'h8620_0000,
    parameter logic [31:0] DMA_BASE     = 32'h8400_0000,
    parameter logic [31:0] CLEAR_BYTES  = 32'h0040_0000
) (
    input  logic        clk,
    input  logic        rst,
    input  logic [95:0] pix_rd_data,
    input  logic        pix_empty,
    output logic        pix_rd_en,
    output logic        bus_req,
    output logic        bus_we,
    output logic [31:0] bus_addr,
    output logic [31:0] bus_wdata,
    input  logic [31:0] bus_rdata,
    input  logic        bus_ack,
    output logic        draw_buf,
    output logic        clearing
);
  typedef enum logic [3:0] {
    W_CLR_DA, W_CLR_LEN, W_CLR_POLL, W_IDLE, W_ZRD, W_ZWR, W_CWR, W_SWAP
  } wstate_e;

  wstate_e     state;
  pixel_t      pix;
  logic [31:0] fb_addr, z_addr, set_base;

  assign set_base = FB_BASE | (32'(draw_buf) << BUF_BIT);
  assign fb_addr  = set_base | (32'(pix.y) << 12) | (32'(pix.x) << 2);
  assign z_addr   = fb_addr | (32'd1 << ZBUF_BIT);
  assign clearing = (state == W_CLR_DA) || (state == W_CLR_LEN) || (state == W_CLR_POLL);
  assign pix_rd_en = (state == W_IDLE) && !pix_empty;

  always_comb begin
    bus_req   = 1'b1;
    bus_we    = 1'b1;
    bus_addr  = '0;
    bus_wdata = '0;
    case (state)
      W_CLR_DA:   begin bus_addr = DMA_BASE;         bus_wdata = set_base; end
      W_CLR_LEN:  begin bus_addr = DMA_BASE + 32'h4; bus_wdata = CLEAR_BYTES; end
      W_CLR_POLL: begin bus_addr = DMA_BASE + 32'h8; bus_we = 1'b0; end
      W_ZRD:      begin bus_addr = z_addr;           bus_we = 1'b0; end
      W_ZWR:      begin bus_addr = z_addr;           bus_wdata = pix.z; end
      W_CWR:      begin bus_addr = fb_addr;          bus_wdata = pix[63:32]; end
      W_SWAP:     begin bus_addr = TFT_BASE_REG;     bus_wdata = set_base; end
      default:    bus_req = 1'b0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= W_CLR_DA;
      draw_buf <= 1'b0;
      pix      <= '0;
    end else begin
      case (state)
        W_IDLE: if (!pix_empty) begin
          pix   <= pixel_t'(pix_rd_data);
          state <= (pix_rd_data == PIXEL_FLUSH) ? W_SWAP : W_ZRD;
        end
        W_ZRD: if (bus_ack)
          state <= (bus_rdata == 32'd0 || pix.z < bus_rdata) ? W_ZWR : W_IDLE;
        W_ZWR: if (bus_ack) state <= W_CWR;
        W_CWR: if (bus_ack) state <= W_IDLE;
        W_SWAP: if (bus_ack) begin
          draw_buf <= ~draw_buf;
          state    <= W_CLR_DA;
        end
        W_CLR_DA:   if (bus_ack) state <= W_CLR_LEN;
        W_CLR_LEN:  if (bus_ack) state <= W_CLR_POLL;
        W_CLR_POLL: if (bus_ack && !bus_rdata[0]) state <= W_IDLE;
        default: state <= W_IDLE;
      endcase
    end
  end

  // a bus request is held, unchanged, until it is acknowledged
  assert property (@(posedge clk) disable iff (rst)
      bus_req && !bus_ack |=> bus_req && $stable(bus_addr) && $stable(bus_we) && $stable(bus_wdata))
    else $error("bus request changed before acknowledge");
endmodule
