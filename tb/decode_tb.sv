// decode_tb: presents instructions to the decode unit directly and plays the matrix
// multiplier with a testbench model (16 cycles, a row offered every 4th cycle).
// Checks, per instruction: the stall length, the stack strobes and which stack they
// address, the argument address and B column given to the multiplier (glMultMatrix,
// glScale, glTranslate, glVertex), the colour, matrix-mode and viewport registers,
// the clip vector captured from the second multiply of glVertex, and the output
// handshake with FIFO-full back-pressure for glVertex and glFlush.
module decode_tb;
  import gl_pkg::*;
  import fp_ref_pkg::*;
  logic clk = 0, rst = 1;
  instr_t instr;
  logic valid = 0, stall;
  logic [31:0] pc = 32'd100, addr2;
  vec4_t args, b_col, mult_row_data, clip;
  logic stk_sel, stk_push, stk_pop, stk_load_id, stk_wr_en, mult_start;
  logic [1:0] mult_col_sel, mult_row_idx;
  logic mult_row_we, mult_done, matrix_mode, out_valid, out_flush, out_full = 0;
  float_t vp_x, vp_y, vp_hw, vp_hh;
  vec3_t color;
  int checks = 0, failures = 0;
  // multiplier model
  logic m_act = 0;
  logic [3:0] m_cnt = 0;
  int passes = 0;

  decode dut (.*);

  always #5 clk = ~clk;

  assign mult_col_sel = m_cnt[1:0];
  assign mult_row_idx = m_cnt[3:2];
  assign mult_row_we  = m_act && m_cnt[1:0] == 3;
  assign mult_done    = m_act && m_cnt == 15;
  // row data: element 0 of row i of pass p is 10*p + i
  always_comb begin
    mult_row_data = '0;
    mult_row_data[0] = fp_from_int(32'(10 * passes + int'(m_cnt[3:2])));
  end
  always @(posedge clk) begin
    if (m_act) begin
      m_cnt <= m_cnt + 1;
      if (m_cnt == 15) begin m_act <= 0; passes <= passes + 1; end
    end
    if (mult_start) begin m_act <= 1; m_cnt <= 0; end
  end

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s", what);
    end
  endtask

  // present one instruction and count the cycles until it completes
  task automatic run(logic [7:0] op, logic t, int data, output int cyc);
    instr = {t, 23'(data), op};
    valid = 1;
    cyc = 1;
    #1;
    while (stall) begin
      @(negedge clk);
      cyc++;
    end
    @(negedge clk);
    valid = 0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    args = '{from_real(4.0), from_real(3.0), from_real(2.0), from_real(1.0)};
    instr = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    chk(vp_hw == from_real(320.0) && vp_hh == from_real(240.0) && color.x == FP_ONE, "reset state");
    // glColor
    run(8'h04, 1, 3, cyc);
    chk(cyc == 1 && color.x == from_real(1.0) && color.y == from_real(2.0) && color.z == from_real(3.0), "glColor");
    // glViewport with integer arguments
    args = '{32'd480, 32'd640, 32'd20, 32'd10};
    run(8'h19, 1, 4, cyc);
    chk(vp_x == from_real(10.0) && vp_y == from_real(20.0) && vp_hw == from_real(320.0) &&
        vp_hh == from_real(240.0), "glViewport");
    // glMatrixMode projection, then stack operations go to the projection stack
    run(8'h10, 0, 32'h1701, cyc);
    chk(matrix_mode == 1, "glMatrixMode");
    instr = {1'b0, 23'd0, 8'h14}; valid = 1; #1;
    chk(stk_push && stk_sel && !stall, "push on projection stack");
    @(negedge clk);
    instr = {1'b0, 23'd0, 8'h15}; #1;
    chk(stk_pop && stk_sel && !stall, "pop");
    @(negedge clk);
    instr = {1'b0, 23'd0, 8'h12}; #1;
    chk(stk_load_id && stk_sel && !stall, "load identity");
    @(negedge clk);
    valid = 0;
    run(8'h10, 0, 32'h1700, cyc);
    chk(matrix_mode == 0, "back to modelview");
    // glMultMatrix: 17 cycles, column j read at pc+1+4j, rows written
    instr = {1'b1, 23'd16, 8'h11}; valid = 1; #1;
    chk(mult_start && stall, "mult start");
    @(negedge clk);
    for (int n = 0; n < 16; n++) begin
      chk(addr2 == pc + 1 + 4 * (n % 4), $sformatf("matrix column address %0d", n));
      chk(b_col == args, "B column from cache");
      chk(stk_wr_en == (n % 4 == 3) && !stk_sel, "row write");
      chk(stall == (n != 15), "stall during multiply");
      @(negedge clk);
    end
    valid = 0;
    // glScale: diagonal columns
    args = '{from_real(9.0), from_real(7.0), from_real(6.0), from_real(5.0)};
    instr = {1'b1, 23'd3, 8'h17}; valid = 1;
    @(negedge clk);
    for (int n = 0; n < 16; n++) begin
      vec4_t e;
      e = '0;
      if (n % 4 == 3) e[3] = FP_ONE; else e[n % 4] = args[n % 4];
      chk(b_col == e, $sformatf("scale column %0d", n % 4));
      @(negedge clk);
    end
    valid = 0;
    // glTranslate: identity with the offset in column 3
    instr = {1'b1, 23'd3, 8'h18}; valid = 1;
    @(negedge clk);
    for (int n = 0; n < 16; n++) begin
      vec4_t e;
      e = '0;
      if (n % 4 == 3) e = '{FP_ONE, args[2], args[1], args[0]}; else e[n % 4] = FP_ONE;
      chk(b_col == e, $sformatf("translate column %0d", n % 4));
      @(negedge clk);
    end
    valid = 0;
    // glVertex: modelview pass, projection pass, then push; FIFO full for 3 cycles
    passes = 10;
    instr = {1'b1, 23'd3, 8'h03}; valid = 1;
    @(negedge clk);
    for (int n = 0; n < 32; n++) begin
      chk(stk_sel == (n >= 16), "vertex stack select");
      if (n % 4 == 0 && n < 16) chk(b_col == '{FP_ONE, args[2], args[1], args[0]}, "vertex column");
      if (n % 4 != 0) chk(b_col == '0, "zero columns");
      chk(!out_valid && stall, "no output during multiply");
      @(negedge clk);
    end
    chk(clip == '{fp_from_int(113), fp_from_int(112), fp_from_int(111), fp_from_int(110)}, "clip captured");
    out_full = 1; #1;
    repeat (3) begin
      chk(out_valid && !out_flush && stall, "waits while full");
      @(negedge clk);
    end
    out_full = 0; #1;
    chk(out_valid && !stall, "vertex pushed");
    @(negedge clk);
    valid = 0;
    // glFlush
    instr = {1'b0, 23'd0, 8'h05}; valid = 1; #1;
    chk(out_valid && out_flush && !stall, "flush pushed");
    @(negedge clk);
    valid = 0;
    // glRotate is carried by software: no action, one cycle
    run(8'h16, 1, 4, cyc);
    chk(cyc == 1 && !m_act, "glRotate no action");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
