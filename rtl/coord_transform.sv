// coord_transform: the coordinate transformation pipeline.
//
// A program of instruction words is loaded into the instruction cache through its
// BRAM port and run by pulsing start. Fetch walks the program; decode drives two
// matrix stacks (modelview and projection) and the 16-cycle matrix multiplier.
// Each glVertex is taken through eye coordinates (modelview), clip coordinates
// (projection), perspective division and the viewport transform, and leaves on
// vtx_data together with the current colour on color_data; fifo_wr writes both
// FIFOs in the same cycle and is never raised while either FIFO is full. glFlush
// leaves as a vertex whose three coordinates are 0xFFFFFFFF.
// Structure and data flow follow the original design; done/running and the
// stack_error flag are this design's additions for observation.
module coord_transform
  import gl_pkg::*;
#(
    parameter int ICACHE_DEPTH = 512,
    parameter int STACK_DEPTH  = 16
) (
    input  logic        clk,
    input  logic        rst,
    input  logic        BRAM_rst,
    input  logic [3:0]  BRAM_wen,
    input  logic [31:0] BRAM_addr,
    input  logic [31:0] BRAM_din,
    output logic [31:0] BRAM_dout,
    input  logic        start,
    output logic        running,
    output logic        done,
    output vec3_t       vtx_data,
    output vec3_t       color_data,
    output logic        fifo_wr,
    input  logic        vtx_full,
    input  logic        color_full,
    output logic        stack_error
);
  logic [31:0] pc, addr2, read0, read1, read2, read3, read4;
  instr_t      instr;
  logic        valid, stall;
  logic        stk_sel, stk_push, stk_pop, stk_load_id, stk_wr_en;
  logic        mult_start, mult_row_we, mult_done, mult_busy;
  logic [1:0]  mult_a_sel, mult_col_sel, mult_row_idx;
  vec4_t       b_col, a_row, mult_row_data, clip;
  mat4_t       mv_top, p_top;
  logic        matrix_mode, out_valid, out_flush, mv_err, p_err;
  float_t      vp_x, vp_y, vp_hw, vp_hh;
  vec3_t       color, ndc, win;
  logic [$clog2(STACK_DEPTH)-1:0] mv_sp, p_sp;

  icache #(.DEPTH(ICACHE_DEPTH)) u_icache (
      .clk, .BRAM_rst, .BRAM_wen, .BRAM_addr, .BRAM_din, .BRAM_dout,
      .addr1(pc), .addr2, .read0, .read1, .read2, .read3, .read4);

  fetch u_fetch (
      .clk, .rst, .start, .stall, .instr_in(read0), .pc, .instr, .valid, .running, .done);

  decode u_decode (
      .clk, .rst, .instr, .valid, .pc, .stall, .addr2,
      .args('{read4, read3, read2, read1}),
      .stk_sel, .stk_push, .stk_pop, .stk_load_id, .stk_wr_en,
      .mult_start, .mult_col_sel, .b_col, .mult_row_we, .mult_row_idx, .mult_row_data,
      .mult_done, .matrix_mode, .vp_x, .vp_y, .vp_hw, .vp_hh, .color, .clip,
      .out_valid, .out_flush, .out_full(vtx_full || color_full));

  matrix_stack #(.DEPTH(STACK_DEPTH)) u_mv (
      .clk, .rst, .push(stk_push && !stk_sel), .pop(stk_pop && !stk_sel),
      .load_id(stk_load_id && !stk_sel), .wr_en(stk_wr_en && !stk_sel),
      .wr_row(mult_row_idx), .wr_data(mult_row_data), .top(mv_top), .sp(mv_sp), .error(mv_err));

  matrix_stack #(.DEPTH(STACK_DEPTH)) u_proj (
      .clk, .rst, .push(stk_push && stk_sel), .pop(stk_pop && stk_sel),
      .load_id(stk_load_id && stk_sel), .wr_en(stk_wr_en && stk_sel),
      .wr_row(mult_row_idx), .wr_data(mult_row_data), .top(p_top), .sp(p_sp), .error(p_err));

  assign a_row = stk_sel ? p_top[mult_a_sel] : mv_top[mult_a_sel];

  matrix_mult u_mult (
      .clk, .rst, .start(mult_start), .a_row_sel(mult_a_sel), .a_row, .b_col_sel(mult_col_sel),
      .b_col, .row_we(mult_row_we), .row_idx(mult_row_idx), .row_data(mult_row_data),
      .busy(mult_busy), .done(mult_done));

  persp_div u_persp (.clip, .ndc);

  viewport u_vp (.ndc, .vp_x, .vp_y, .vp_hw, .vp_hh, .win);

  assign vtx_data    = out_flush ? '{FP_FLUSH, FP_FLUSH, FP_FLUSH} : win;
  assign color_data  = color;
  assign fifo_wr     = out_valid && !(vtx_full || color_full);
  assign stack_error = mv_err || p_err;
endmodule
