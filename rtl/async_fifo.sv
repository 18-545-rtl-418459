// async_fifo: dual-clock FIFO, used for the vertex, colour and pixel queues between
// the coordinate transform, rasterizer and frame buffer writer clock domains.
//
// DEPTH (a power of two) entries of WIDTH bits. Binary pointers with one extra wrap
// bit are converted to Gray code and passed through two-flop synchronizers into the
// other domain; full and empty are computed from the local pointer and the
// synchronized remote one, so both are conservative (full may stay high, and empty
// may stay high, for two cycles after the other side has moved).
// Write side: wr_data is stored at the wr_clk edge when wr_en is high and full is
// low. Read side is first-word-fall-through: rd_data shows the oldest entry while
// empty is low, and rd_en (ignored when empty) removes it at the rd_clk edge.
// Each side has its own synchronous reset; assert both together.
// The clock-crossing FIFO with full/empty flags follows the original design (which
// used generated vendor FIFOs); depth 16 and first-word-fall-through reads are this
// design's choices.
module async_fifo #(
    parameter int WIDTH = 96,
    parameter int DEPTH = 16
) (
    input  logic             wr_clk,
    input  logic             wr_rst,
    input  logic             wr_en,
    input  logic [WIDTH-1:0] wr_data,
    output logic             full,
    input  logic             rd_clk,
    input  logic             rd_rst,
    input  logic             rd_en,
    output logic [WIDTH-1:0] rd_data,
    output logic             empty
);
  localparam int AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2, wgray_r1, wgray_r2;
  logic [AW:0] wbin_next, rbin_next;

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // write domain
  assign wbin_next = wbin + (AW + 1)'(wr_en && !full);
  assign full = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});

  always_ff @(posedge wr_clk) begin
    if (wr_rst) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      wbin     <= wbin_next;
      wgray    <= bin2gray(wbin_next);
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
    end
  end

  always_ff @(posedge wr_clk)
    if (wr_en && !full) mem[wbin[AW-1:0]] <= wr_data;

  // read domain
  assign rbin_next = rbin + (AW + 1)'(rd_en && !empty);
  assign empty   = (rgray == wgray_r2);
  assign rd_data = mem[rbin[AW-1:0]];

  always_ff @(posedge rd_clk) begin
    if (rd_rst) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      rbin     <= rbin_next;
      rgray    <= bin2gray(rbin_next);
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
    end
  end
endmodule
