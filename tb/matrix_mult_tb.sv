// matrix_mult_tb: multiplies random integer matrices, two products back to back, and
// checks every row written back against C = A x B computed in the testbench, the
// row order and the 16-cycle duration of each product.
module matrix_mult_tb;
  import gl_pkg::*;
  import fp_ref_pkg::*;
  logic clk = 0, rst = 1, start = 0;
  logic [1:0] a_row_sel, b_col_sel, row_idx;
  vec4_t a_row, b_col, row_data;
  logic row_we, busy, done;
  real A [4][4], B [4][4];
  int checks = 0, failures = 0, cycles, rows_seen, products = 0;

  matrix_mult dut (.*);

  always #5 clk = ~clk;

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      a_row[k] = from_real(A[a_row_sel][k]);
      b_col[k] = from_real(B[k][b_col_sel]);
    end
  end

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitor: rows written back
  always @(posedge clk) if (!rst && row_we) begin
    chk(row_idx == 2'(rows_seen % 4), "row order");
    for (int j = 0; j < 4; j++) begin
      real e;
      e = 0.0;
      for (int k = 0; k < 4; k++) e += A[row_idx][k] * B[k][j];
      chk(row_data[j] == from_real(e) || (e == 0.0 && row_data[j][30:0] == 0), $sformatf("C[%0d][%0d]", row_idx, j));
    end
    rows_seen++;
  end

  initial begin
    rows_seen = 0;
    for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) begin
      A[r][c] = real'(int'($urandom % 21) - 10);
      B[r][c] = real'(int'($urandom % 21) - 10);
    end
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    // each product: count the cycles with busy high, sampled between edges
    for (int p = 0; p < 2; p++) begin
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      cycles = 0;
      while (busy) begin
        cycles++;
        @(negedge clk);
      end
      chk(cycles == 16, $sformatf("product took %0d cycles", cycles));
      products++;
    end
    // back-to-back: start again in the done cycle
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    repeat (15) @(negedge clk);
    chk(done, "first of back-to-back");
    start = 1;
    @(negedge clk);
    start = 0;
    chk(busy, "restart in done cycle");
    repeat (15) @(negedge clk);
    chk(done, "second of back-to-back");
    @(negedge clk);
    chk(!busy, "idle after product");
    chk(rows_seen == 16, $sformatf("rows written %0d", rows_seen));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
