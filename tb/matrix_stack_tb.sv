// matrix_stack_tb: random push, pop, load-identity and row writes against a model
// stack kept in the testbench; checks the top matrix, the stack pointer and the
// error flag after each operation, including overflow and popping at the bottom.
module matrix_stack_tb;
  import gl_pkg::*;
  localparam int DEPTH = 16;
  logic clk = 0, rst = 1, push = 0, pop = 0, load_id = 0, wr_en = 0, error;
  logic [1:0] wr_row = 0;
  vec4_t wr_data = '0;
  mat4_t top;
  logic [3:0] sp;
  mat4_t model [DEPTH];
  int msp = 0, checks = 0, failures = 0, merr = 0;
  int overflows = 0, underflows = 0;

  matrix_stack #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model[0] = mat_identity();
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int t = 0; t < 3000; t++) begin
      int op;
      // bias toward pushes in the first half and pops in the second to hit both ends
      op = $urandom % 8;
      push <= 0; pop <= 0; load_id <= 0; wr_en <= 0;
      merr = 0;
      if ((t < 1500 && op < 3) || (t >= 1500 && op == 0)) begin
        push <= 1;
        if (msp == DEPTH - 1) merr = 1;
        else begin model[msp + 1] = model[msp]; msp++; end
      end else if ((t < 1500 && op == 3) || (t >= 1500 && op < 4)) begin
        pop <= 1;
        if (msp == 0) merr = 1; else msp--;
      end else if (op == 4) begin
        load_id <= 1;
        model[msp] = mat_identity();
      end else begin
        vec4_t d;
        logic [1:0] r;
        r = 2'($urandom);
        for (int k = 0; k < 4; k++) d[k] = $urandom;
        wr_en <= 1; wr_row <= r; wr_data <= d;
        model[msp][r] = d;
      end
      @(posedge clk);
      push <= 0; pop <= 0; load_id <= 0; wr_en <= 0;
      @(negedge clk);
      checks++;
      if (top !== model[msp] || int'(sp) != msp || error != merr) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d sp=%0d/%0d err=%0d/%0d", t, sp, msp, error, merr);
      end
      if (merr && msp != 0) overflows++;
      if (merr && msp == 0) underflows++;
    end
    checks++;
    if (overflows == 0 || underflows == 0) begin
      failures++;
      $display("FAIL overflow %0d underflow %0d", overflows, underflows);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
