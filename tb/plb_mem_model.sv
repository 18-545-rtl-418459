// plb_mem_model: behavioural model, for testbenches only, of what the frame buffer
// writer reaches over the processor bus: memory holding the two frame/z buffer sets,
// a DMA engine that fills a region with zeros, and the display controller's frame
// base register. Not synthesizable design content.
//   memory      MEM_BASE .. MEM_BASE + 8 MB, one word per address/4, random 0..3
//               cycle acknowledge latency
//   DMA         DMA_BASE + 0x0 destination, + 0x4 length in bytes (starts the fill),
//               + 0x8 status (bit 0 busy); clears FILL_PER_CYCLE words per cycle
//   display     TFT_BASE_REG holds the base address of the buffer being shown
module plb_mem_model #(
    parameter logic [31:0] MEM_BASE       = 32'h9000_0000,
    parameter logic [31:0] DMA_BASE       = 32'h8400_0000,
    parameter logic [31:0] TFT_BASE_REG   = 32'h8620_0000,
    parameter int          FILL_PER_CYCLE = 8192
) (
    input  logic        clk,
    input  logic        bus_req,
    input  logic        bus_we,
    input  logic [31:0] bus_addr,
    input  logic [31:0] bus_wdata,
    output logic [31:0] bus_rdata,
    output logic        bus_ack,
    output logic [31:0] display_base,
    output int          dma_fills
);
  localparam int WORDS = 1 << 21;
  logic [31:0] mem [WORDS];
  logic [31:0] dma_dst = 0, dma_ptr = 0;
  longint      dma_left = 0;
  int          wait_cnt = -1;

  initial begin
    bus_ack = 0;
    bus_rdata = 0;
    display_base = 0;
    dma_fills = 0;
    // power-up contents are unknown: fill with garbage
    for (int i = 0; i < WORDS; i++) mem[i] = 32'hdead_0000 | 32'(i & 16'hffff);
  end

  function automatic bit in_mem(logic [31:0] a);
    return a >= MEM_BASE && a < MEM_BASE + 32'(WORDS * 4);
  endfunction

  always @(posedge clk) begin
    bus_ack <= 0;
    // DMA fill
    for (int k = 0; k < FILL_PER_CYCLE && dma_left > 0; k++) begin
      if (in_mem(dma_ptr)) mem[(dma_ptr - MEM_BASE) >> 2] = 0;
      dma_ptr  += 4;
      dma_left -= 4;
    end
    if (bus_req && !bus_ack) begin
      if (wait_cnt < 0) wait_cnt = $urandom % 4;
      if (wait_cnt == 0) begin
        wait_cnt = -1;
        bus_ack <= 1;
        if (bus_we) begin
          if (in_mem(bus_addr)) mem[(bus_addr - MEM_BASE) >> 2] = bus_wdata;
          else if (bus_addr == DMA_BASE) dma_dst = bus_wdata;
          else if (bus_addr == DMA_BASE + 4) begin
            dma_ptr = dma_dst;
            dma_left = longint'(bus_wdata);
            dma_fills++;
          end else if (bus_addr == TFT_BASE_REG) display_base <= bus_wdata;
        end else begin
          if (in_mem(bus_addr)) bus_rdata <= mem[(bus_addr - MEM_BASE) >> 2];
          else if (bus_addr == DMA_BASE + 8) bus_rdata <= {31'd0, dma_left > 0};
          else bus_rdata <= 32'd0;
        end
      end else wait_cnt--;
    end
  end

  function automatic logic [31:0] peek(logic [31:0] a);
    return mem[(a - MEM_BASE) >> 2];
  endfunction
endmodule
