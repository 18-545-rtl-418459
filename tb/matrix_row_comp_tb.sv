// matrix_row_comp_tb: dot products of random small-integer and half-integer vectors,
// whose exact sums are representable, checked against real arithmetic.
module matrix_row_comp_tb;
  import gl_pkg::*;
  import fp_ref_pkg::*;
  vec4_t  row, col;
  float_t y;
  real    exp_r;
  int checks = 0, failures = 0;

  matrix_row_comp dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      exp_r = 0.0;
      for (int i = 0; i < 4; i++) begin
        real a, b;
        a = real'(int'($urandom % 33) - 16) / 2.0;
        b = real'(int'($urandom % 65) - 32);
        row[i] = from_real(a);
        col[i] = from_real(b);
        exp_r += a * b;
      end
      #1;
      checks++;
      if (y !== from_real(exp_r) && !(exp_r == 0.0 && y[30:0] == 0)) begin
        failures++;
        if (failures < 10) $display("FAIL y=%h expected %f", y, exp_r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
