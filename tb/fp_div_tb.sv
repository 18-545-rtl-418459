// fp_div_tb: checks fp_div against double precision arithmetic rounded to single.
// Directed cases cover exact small values and zero; random operands keep exponents
// within a range where the double result is exact before the final rounding.
module fp_div_tb;
  import fp_ref_pkg::*;
  logic [31:0] a, b, y, exp_y;
  logic        sub;
  int          checks = 0, failures = 0;
  real         ra, rb;

  fp_div dut (.a(a), .b(b), .y(y));

  task automatic check_one(logic [31:0] xa, logic [31:0] xb, logic s);
    a = xa; b = xb; sub = s;
    #1;
    ra = to_real(a); rb = to_real(b);
    exp_y = from_real(ra / rb);
    checks++;
    if (y !== exp_y && !(y[30:0] == 0 && exp_y[30:0] == 0)) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h b=%h sub=%0d y=%h expected %h", a, b, s, y, exp_y);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_one(32'h3f800000, 32'h40000000, 0);  // 1, 2
    check_one(32'h40400000, 32'h3f000000, 1);  // 3, 0.5
    check_one(32'hc0a00000, 32'h40a00000, 0);  // -5, 5
    check_one(32'h3f800000, 32'h3f800001, 1);
    check_one(32'h00000000, 32'h41200000, 0);
    for (int i = 0; i < 3000; i++) check_one(rand_float(-12, 12), rand_float(-12, 12), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
