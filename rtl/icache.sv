// icache: instruction cache of the coordinate transform pipeline.
//
// DEPTH words of 32 bits held in registers, so that all reads are combinational:
//   read0      = mem[addr1]                  (fetch: the instruction word at the PC)
//   read1..4   = mem[addr2 .. addr2+3]       (decode: up to four argument words)
// addr1/addr2 are word addresses taken modulo DEPTH. The write side looks like a
// vendor block-RAM port so that a processor-bus-to-BRAM bridge can load programs:
// BRAM_addr is a byte address, BRAM_wen holds one write enable per byte lane, and
// BRAM_dout returns mem[BRAM_addr] one clock after the address (a synchronous read,
// cleared by BRAM_rst). Writes take effect at the clock edge.
// The depth (512), the five combinational reads, the single write port and the port
// names follow the original design; the byte-lane enables and the split of the read
// ports between fetch and decode are this design's choices.
module icache #(
    parameter int DEPTH = 512
) (
    input  logic        clk,
    input  logic        BRAM_rst,
    input  logic [3:0]  BRAM_wen,
    input  logic [31:0] BRAM_addr,
    input  logic [31:0] BRAM_din,
    output logic [31:0] BRAM_dout,
    input  logic [31:0] addr1,
    input  logic [31:0] addr2,
    output logic [31:0] read0,
    output logic [31:0] read1,
    output logic [31:0] read2,
    output logic [31:0] read3,
    output logic [31:0] read4
);
  localparam int AW = $clog2(DEPTH);

  logic [31:0] mem [DEPTH];
  logic [AW-1:0] waddr;

  assign waddr = BRAM_addr[AW+1:2];

  always_ff @(posedge clk) begin
    for (int b = 0; b < 4; b++)
      if (BRAM_wen[b]) mem[waddr][8*b +: 8] <= BRAM_din[8*b +: 8];
    if (BRAM_rst) BRAM_dout <= '0;
    else          BRAM_dout <= mem[waddr];
  end

  assign read0 = mem[addr1[AW-1:0]];
  assign read1 = mem[AW'(addr2[AW-1:0] + AW'(0))];
  assign read2 = mem[AW'(addr2[AW-1:0] + AW'(1))];
  assign read3 = mem[AW'(addr2[AW-1:0] + AW'(2))];
  assign read4 = mem[AW'(addr2[AW-1:0] + AW'(3))];
endmodule
